// fir7_mbff: 7-tap FIR filter built from two 2-bit multi-bit flip-flops and
// one single register.
//
// x(k) feeds the multipliers of H1 and H2 and both words of the first 2-bit
// MBFF. The first MBFF's words drive H3 and H4 and are passed word for word
// into the second 2-bit MBFF. The second MBFF's first word drives H6, its
// second word drives H5 and a single register (dfff) that drives H7:
//   y(k) = (H1 + H2) x(k) + (H3 + H4) x(k-1) + (H5 + H6) x(k-2) + H7 x(k-3)
// Five sample registers in three stages; the output reaches its final value
// on the 3rd clock edge after the input settles (six for a chain of single
// registers).
//
// Interface: xin is x(k); h[0..6] are H1..H7; dataout is y(k), combinational,
// wrapping modulo 2^OUT_W. rst is a synchronous active-high clear of the delay
// registers (this design's choice). Widths follow the 5-tap filter.
module fir7_mbff #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [DATA_W-1:0]        xin,
  input  logic [6:0][COEF_W-1:0]   h,
  output logic [OUT_W-1:0]         dataout
);
  logic [1:0][DATA_W-1:0] s1;   // first 2-bit MBFF: x(k-1), x(k-1)
  logic [1:0][DATA_W-1:0] s2;   // second 2-bit MBFF: x(k-2), x(k-2)
  logic [DATA_W-1:0]      s3;   // 1-bit FF: x(k-3)
  logic [6:0][DATA_W-1:0] tap;

  dmbff #(.NBITS(2), .W(DATA_W)) u_mbff1 (
    .clk, .rst,
    .d({2{xin}}),
    .q(s1)
  );

  dmbff #(.NBITS(2), .W(DATA_W)) u_mbff2 (
    .clk, .rst,
    .d(s1),
    .q(s2)
  );

  dfff #(.W(DATA_W)) u_ff3 (
    .clk, .rst,
    .d(s2[1]),
    .q(s3)
  );

  assign tap[0] = xin;    // H1
  assign tap[1] = xin;    // H2
  assign tap[2] = s1[0];  // H3
  assign tap[3] = s1[1];  // H4
  assign tap[4] = s2[1];  // H5: second word, also feeds the 1-bit FF
  assign tap[5] = s2[0];  // H6
  assign tap[6] = s3;     // H7

  fir_sop #(.NTAPS(7), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_sop (
    .x(tap),
    .h(h),
    .y(dataout)
  );
endmodule
