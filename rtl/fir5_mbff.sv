// fir5_mbff: 5-tap FIR filter whose delay line is built from a multi-bit
// flip-flop.
//
// Instead of a chain of four one-sample registers, the sample x(k) is loaded
// into both words of one 2-bit MBFF (dmbff). Its first word drives the
// multiplier of H3, its second word drives H4 and a single register (dfff)
// whose output drives H5. H1 and H2 both take x(k) directly. The filter thus
// computes
//   y(k) = (H1 + H2) x(k) + (H3 + H4) x(k-1) + H5 x(k-2)
// with three sample registers, two of them sharing one clock driver, and
// reaches its final value on the 2nd clock edge after the input settles
// (a chain of four single registers needs four). This is the structure of
// the reference MBFF 5-tap filter; for xin = 8 and H = 7, 2, 1, 10, 3 the
// output is 72, then 160 after one edge and 184 after two.
//
// Interface: xin is x(k); h[0..4] are H1..H5 (run-time inputs); dataout is
// y(k), 8 bits, wrapping modulo 256. dataout is combinational from xin, h
// and the registers. rst is a synchronous active-high clear of the delay
// registers (reset style is this design's choice).
module fir5_mbff #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [DATA_W-1:0]        xin,
  input  logic [4:0][COEF_W-1:0]   h,
  output logic [OUT_W-1:0]         dataout
);
  logic [1:0][DATA_W-1:0] s1;   // 2-bit MBFF: two copies of x(k-1)
  logic [DATA_W-1:0]      s2;   // 1-bit FF: x(k-2)
  logic [4:0][DATA_W-1:0] tap;  // multiplier inputs of H1..H5

  dmbff #(.NBITS(2), .W(DATA_W)) u_mbff1 (
    .clk, .rst,
    .d({2{xin}}),
    .q(s1)
  );

  dfff #(.W(DATA_W)) u_ff2 (
    .clk, .rst,
    .d(s1[1]),
    .q(s2)
  );

  assign tap[0] = xin;    // H1
  assign tap[1] = xin;    // H2
  assign tap[2] = s1[0];  // H3: first MBFF word
  assign tap[3] = s1[1];  // H4: second MBFF word
  assign tap[4] = s2;     // H5

  fir_sop #(.NTAPS(5), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_sop (
    .x(tap),
    .h(h),
    .y(dataout)
  );
endmodule
