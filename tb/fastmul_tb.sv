// fastmul_tb: exhaustive self-checking test of the 4 x 4 array multiplier,
// plus a random test of a 6 x 5 instance to exercise the generic array.
// Expected products come from the simulator's own integer multiplication.
module fastmul_tb;
  logic [3:0] a, b;
  logic [7:0] p;
  logic [5:0] a6;
  logic [4:0] b5;
  logic [10:0] p65;
  int checks = 0, failures = 0;

  fastmul #(.AW(4), .BW(4)) dut (.a, .b, .p);
  fastmul #(.AW(6), .BW(5)) dut65 (.a(a6), .b(b5), .p(p65));

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin failures++; $display("%0d * %0d = %0d", i, j, p); end
      end
    end
    for (int n = 0; n < 500; n++) begin
      a6 = 6'($urandom); b5 = 5'($urandom);
      #1;
      checks++;
      if (int'(p65) != int'(a6) * int'(b5)) begin failures++; $display("%0d * %0d = %0d", a6, b5, p65); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
