// lookahead_tb: exhaustive self-checking test of the 8-bit carry-lookahead
// adder over all a, b and cin (131072 cases), checking sum and carry out
// against integer addition, plus a random test of a 13-bit instance.
module lookahead_tb;
  logic [7:0] a, b, sum;
  logic cin, cout;
  logic [12:0] a13, b13, s13;
  logic c13;
  int checks = 0, failures = 0;

  lookahead #(.N(8)) dut (.a, .b, .cin, .sum, .cout);
  lookahead #(.N(13)) dut13 (.a(a13), .b(b13), .cin(1'b1), .sum(s13), .cout(c13));

  initial begin
    #1000000;
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = 1'(c);
          #1;
          checks++;
          if (int'({cout, sum}) != i + j + c) begin
            failures++;
            if (failures < 10) $display("%0d + %0d + %0d = %0d", i, j, c, {cout, sum});
          end
        end
      end
    end
    for (int n = 0; n < 1000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom);
      #1;
      checks++;
      if (int'({c13, s13}) != int'(a13) + int'(b13) + 1) begin failures++; $display("13-bit %0d + %0d", a13, b13); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
