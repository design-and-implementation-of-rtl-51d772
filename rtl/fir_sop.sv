// fir_sop: multiply-and-add datapath shared by the MBFF FIR filters.
//
// Given the NTAPS sample values that feed the multipliers of a filter
// (x(k) and its delayed copies, in tap order) and the coefficients H1..Hn, it
// forms every product with its own array multiplier (fastmul) and sums the
// products with a chain of NTAPS-1 carry-lookahead adders (lookahead):
//   y = (((x[0]h[0] + x[1]h[1]) + x[2]h[2]) + ...) + x[n-1]h[n-1]
// which is the left-to-right adder chain of a direct-form FIR filter.
// Products are resized to OUT_W bits (no change at the default 4 x 4 -> 8)
// and the sum wraps modulo 2^OUT_W; adder carry-outs are not used.
//
// Purely combinational: y follows x and h in the same cycle.
module fir_sop #(
  parameter int unsigned NTAPS  = 5,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic [NTAPS-1:0][DATA_W-1:0] x,
  input  logic [NTAPS-1:0][COEF_W-1:0] h,
  output logic [OUT_W-1:0]             y
);
  localparam int unsigned PW = DATA_W + COEF_W;

  logic [NTAPS-1:0][PW-1:0]    prod;
  logic [NTAPS-1:0][OUT_W-1:0] prod_r;
  logic [NTAPS-1:0][OUT_W-1:0] acc;     // acc[i]: sum of products 0..i
  logic [NTAPS-1:0]            carry;   // adder carry-outs, not used

  for (genvar i = 0; i < NTAPS; i++) begin : g_mul
    fastmul #(.AW(DATA_W), .BW(COEF_W)) u_mul (
      .a(x[i]),
      .b(h[i]),
      .p(prod[i])
    );
    assign prod_r[i] = OUT_W'(prod[i]);
  end

  assign acc[0]   = prod_r[0];
  assign carry[0] = 1'b0;
  for (genvar i = 1; i < NTAPS; i++) begin : g_add
    lookahead #(.N(OUT_W)) u_add (
      .a   (acc[i-1]),
      .b   (prod_r[i]),
      .cin (1'b0),
      .sum (acc[i]),
      .cout(carry[i])
    );
  end

  assign y = acc[NTAPS-1];
endmodule
