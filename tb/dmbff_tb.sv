// dmbff_tb: self-checking test of the multi-bit flip-flop.
//
// Runs a 2-bit and a 3-bit instance with different random data on every
// word, and checks after each rising edge that every word captured its own
// input on that same edge (one cycle of latency, no word lagging or swapped),
// that the words hold between edges, and that the synchronous reset clears
// all words together.
module dmbff_tb;
  localparam int W = 4;
  logic clk = 1'b0;
  logic rst;
  logic [1:0][W-1:0] d2, q2, e2;
  logic [2:0][W-1:0] d3, q3, e3;
  int checks = 0, failures = 0;

  dmbff #(.NBITS(2), .W(W)) dut2 (.clk, .rst, .d(d2), .q(q2));
  dmbff #(.NBITS(3), .W(W)) dut3 (.clk, .rst, .d(d3), .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int n);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (q2[i] !== e2[i]) begin failures++; $display("%s %0d: 2-bit word %0d q=%h exp=%h", what, n, i, q2[i], e2[i]); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (q3[i] !== e3[i]) begin failures++; $display("%s %0d: 3-bit word %0d q=%h exp=%h", what, n, i, q3[i], e3[i]); end
    end
  endtask

  initial begin
    rst = 1'b1;
    d2 = '1; d3 = '1;
    @(posedge clk); #1;
    e2 = '0; e3 = '0;
    check("reset", 0);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 2; i++) d2[i] = W'($urandom);
      for (int i = 0; i < 3; i++) d3[i] = W'($urandom);
      if (n % 40 == 39) rst = 1'b1;
      e2 = rst ? '0 : d2;
      e3 = rst ? '0 : d3;
      @(posedge clk); #1;
      check("edge", n);
      @(negedge clk);
      rst = 1'b0;
      d2 = ~d2; d3 = ~d3;
      #1;
      check("hold", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
