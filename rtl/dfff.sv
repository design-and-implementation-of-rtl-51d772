// dfff: one-sample delay register (z^-1) of a direct-form FIR filter.
//
// A W-bit D register clocked on the rising edge of clk. It is the "1-bit
// flip-flop" of the filters: one register that holds one sample, with a clock
// pin of its own. A synchronous, active-high reset clears it; the reset style
// is this design's choice.
//
// Timing: q takes the value d had just before a rising clk edge; one cycle
// of latency.
module dfff #(
  parameter int unsigned W = fir_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
