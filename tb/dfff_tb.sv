// dfff_tb: self-checking test of the one-sample delay register.
//
// Drives random samples on the falling clock edge and checks after every
// rising edge that q holds the sample applied before that edge (one cycle of
// latency), and that a synchronous reset clears q on the next edge.
module dfff_tb;
  localparam int W = 4;
  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] d, q, expect_q;
  int checks = 0, failures = 0;

  dfff #(.W(W)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d = 4'hF;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      d = W'($urandom);
      expect_q = d;
      // a reset cycle now and then
      if (n % 50 == 49) rst = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (rst ? (q !== '0) : (q !== expect_q)) begin
        failures++;
        $display("cycle %0d: rst=%b d=%h q=%h", n, rst, expect_q, q);
      end
      @(negedge clk);
      rst = 1'b0;
      // q must hold while d changes between edges
      expect_q = q;
      d = ~d;
      #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("cycle %0d: q changed between edges", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
