// fir_mbff_top: the 5-, 7- and 9-tap multi-bit flip-flop FIR filters side by
// side.
//
// The three filter sizes are independent designs; this top only places them
// together so that they can be built and simulated as one unit. They share
// clk and rst and nothing else: each has its own sample input, its own
// coefficient inputs and its own output.
//
//   fir5_mbff: one 2-bit MBFF + one register, final output on the 2nd edge
//   fir7_mbff: two 2-bit MBFFs + one register, final output on the 3rd edge
//   fir9_mbff: two 3-bit MBFFs,               final output on the 2nd edge
//
// All outputs are combinational from the inputs and the delay registers;
// rst is a synchronous, active-high clear of all delay registers.
module fir_mbff_top #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  // 5-tap filter
  input  logic [DATA_W-1:0]        xin5,
  input  logic [4:0][COEF_W-1:0]   h5tap,
  output logic [OUT_W-1:0]         dataout5,
  // 7-tap filter
  input  logic [DATA_W-1:0]        xin7,
  input  logic [6:0][COEF_W-1:0]   h7tap,
  output logic [OUT_W-1:0]         dataout7,
  // 9-tap filter
  input  logic [DATA_W-1:0]        xin9,
  input  logic [8:0][COEF_W-1:0]   h9tap,
  output logic [OUT_W-1:0]         dataout9
);
  fir5_mbff #(.DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_fir5 (
    .clk, .rst, .xin(xin5), .h(h5tap), .dataout(dataout5)
  );

  fir7_mbff #(.DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_fir7 (
    .clk, .rst, .xin(xin7), .h(h7tap), .dataout(dataout7)
  );

  fir9_mbff #(.DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_fir9 (
    .clk, .rst, .xin(xin9), .h(h9tap), .dataout(dataout9)
  );
endmodule
