// lookahead: N-bit carry-lookahead adder, sum = a + b + cin.
//
// Each bit position forms a generate g = a & b and a propagate p = a ^ b.
// Every carry is then computed directly, without rippling, as
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[1]g[0] | p[i-1]..p[0]cin
// (one level of lookahead across the whole word), and sum = p ^ c.
// cout is the carry out of the top bit.
//
// The filters chain these adders to sum the tap products; they tie cin to 0
// and leave cout open, so the filter output wraps modulo 2^N. Purely
// combinational. The single-level lookahead is this design's choice; the
// filter description only asks for a carry look-ahead adder.
module lookahead #(
  parameter int unsigned N = fir_pkg::OUT_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] g, p;
  logic [N:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c = '0;
    c[0] = cin;
    for (int i = 1; i <= N; i++) begin
      logic any;
      any = 1'b0;
      // j = -1 stands for the carry in, j >= 0 for the generate of bit j.
      for (int j = -1; j < i; j++) begin
        logic t;
        t = (j < 0) ? cin : g[j];
        for (int k = j + 1; k < i; k++) begin
          t = t & p[k];
        end
        any = any | t;
      end
      c[i] = any;
    end
  end

  assign sum  = p ^ c[N-1:0];
  assign cout = c[N];
endmodule
