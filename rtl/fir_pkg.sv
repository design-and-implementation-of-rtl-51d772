// fir_pkg: widths shared by the multi-bit flip-flop FIR filters.
//
// The filters take 4-bit unsigned samples and 4-bit unsigned coefficients,
// form 8-bit products and add them into an 8-bit output that wraps modulo
// 256. These three widths are the ones of the reference 5-tap filter; the
// 7- and 9-tap filters reuse them.
package fir_pkg;
  localparam int unsigned DATA_W = 4;  // sample x(k)
  localparam int unsigned COEF_W = 4;  // coefficient H1..Hn
  localparam int unsigned OUT_W  = 8;  // product and filter output y(k)
endpackage
