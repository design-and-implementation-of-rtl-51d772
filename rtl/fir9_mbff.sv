// fir9_mbff: 9-tap FIR filter built from two 3-bit multi-bit flip-flops.
//
// x(k) feeds the multipliers of H1, H2 and H3 and all three words of the
// first 3-bit MBFF. Its words drive H4, H5 and H6 and are passed word for word
// into the second 3-bit MBFF, whose words drive H7, H8 and H9:
//   y(k) = (H1 + H2 + H3) x(k) + (H4 + H5 + H6) x(k-1) + (H7 + H8 + H9) x(k-2)
// Six sample registers in two stages, each stage one clock driver; the output
// reaches its final value on the 2nd clock edge after the input settles
// (eight for a chain of single registers).
//
// Interface: xin is x(k); h[0..8] are H1..H9; dataout is y(k), combinational,
// wrapping modulo 2^OUT_W. rst is a synchronous active-high clear of the delay
// registers (this design's choice). Widths follow the 5-tap filter.
module fir9_mbff #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [DATA_W-1:0]        xin,
  input  logic [8:0][COEF_W-1:0]   h,
  output logic [OUT_W-1:0]         dataout
);
  logic [2:0][DATA_W-1:0] s1;   // first 3-bit MBFF: three copies of x(k-1)
  logic [2:0][DATA_W-1:0] s2;   // second 3-bit MBFF: three copies of x(k-2)
  logic [8:0][DATA_W-1:0] tap;

  dmbff #(.NBITS(3), .W(DATA_W)) u_mbff1 (
    .clk, .rst,
    .d({3{xin}}),
    .q(s1)
  );

  dmbff #(.NBITS(3), .W(DATA_W)) u_mbff2 (
    .clk, .rst,
    .d(s1),
    .q(s2)
  );

  assign tap[0] = xin;    // H1
  assign tap[1] = xin;    // H2
  assign tap[2] = xin;    // H3
  assign tap[3] = s1[0];  // H4
  assign tap[4] = s1[1];  // H5
  assign tap[5] = s1[2];  // H6
  assign tap[6] = s2[0];  // H7
  assign tap[7] = s2[1];  // H8
  assign tap[8] = s2[2];  // H9

  fir_sop #(.NTAPS(9), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_sop (
    .x(tap),
    .h(h),
    .y(dataout)
  );
endmodule
