// dmbff: multi-bit flip-flop (MBFF), NBITS sample registers under one clock.
//
// An MBFF merges NBITS single flip-flops so that they share one clock
// driver: DATA1..DATAn are captured into OUT1..OUTn on the same rising edge,
// and hold their value in between. Each "bit" here stores a whole W-bit
// sample, so a 2-bit MBFF is two sample registers clocked together, used in
// the filters as two parallel copies of one delay stage. The saving in clock
// inverters is a property of the cell that a tool maps this onto; in RTL the
// sharing shows as one always_ff over all words with one clock and reset.
//
// Interface: d[i] -> q[i] for i = 0..NBITS-1 (DATA(i+1) -> OUT(i+1)).
// Timing: one cycle of latency on every word. Reset is synchronous and
// active high (this design's choice).
module dmbff #(
  parameter int unsigned NBITS = 2,
  parameter int unsigned W     = fir_pkg::DATA_W
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NBITS-1:0][W-1:0]   d,
  output logic [NBITS-1:0][W-1:0]   q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
