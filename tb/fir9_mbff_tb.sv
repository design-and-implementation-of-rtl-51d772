// fir9_mbff_tb: self-checking test of the 9-tap MBFF FIR filter.
//
// The reference model keeps its own history of the samples applied and
// computes y(k) = sum of H[i] * x(k - DELAY[i]) modulo 256, where DELAY[i]
// is the number of registers between the input and the multiplier of tap i
// in the MBFF structure (0, 0, 0, 1, 1, 1, 2, 2, 2). It checks:
//  - a step input with all coefficients non-zero: the output must still be
//    changing after edge 1 and must reach its final value on edge 2
//    ("output at clock pulse 2"), and stay there;
//  - random samples and coefficients, with occasional synchronous resets.
// Samples change on the falling edge and are checked 1 time unit later.
module fir9_mbff_tb;
  localparam int NT = 9;
  localparam int D  = 2;
  localparam int LAT = 2;
  localparam int DELAY [NT] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};

  logic clk = 1'b0;
  logic rst;
  logic [3:0] xin;
  logic [NT-1:0][3:0] h;
  logic [7:0] dataout;
  int hist [D+1];         // hist[0] = x(k), hist[d] = x(k-d)
  int checks = 0, failures = 0;

  fir9_mbff dut (.clk, .rst, .xin, .h, .dataout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model();
    int y = 0;
    for (int i = 0; i < NT; i++) y += int'(h[i]) * hist[DELAY[i]];
    return y % 256;
  endfunction

  task automatic check_val(input int exp, input string what);
    checks++;
    if (int'(dataout) != exp) begin
      failures++;
      $display("%s: dataout=%0d expected=%0d", what, dataout, exp);
    end
  endtask

  // Synchronous reset for one edge; clears the model history too.
  task automatic apply_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int d = 0; d <= D; d++) hist[d] = 0;
    @(negedge clk);
  endtask

  // One rising edge: the filter and the model shift in xin.
  task automatic clock_edge();
    @(posedge clk);
    for (int d = D; d > 0; d--) hist[d] = hist[d-1];
    #1;
  endtask

  initial begin
    int final_y;
    rst = 1'b1;
    xin = '0;
    h = '0;
    for (int d = 0; d <= D; d++) hist[d] = 0;
    apply_reset();

    // Step response latency with random non-zero coefficients.
    for (int t = 0; t < 20; t++) begin
      apply_reset();
      for (int i = 0; i < NT; i++) h[i] = 4'(1 + $urandom_range(14));
      xin = 4'(1 + $urandom_range(14));
      hist[0] = int'(xin);
      for (int d = 1; d <= D; d++) hist[d] = int'(xin);
      final_y = model();
      for (int d = 1; d <= D; d++) hist[d] = 0;
      #1;
      check_val(model(), "step, before 1st edge");
      for (int e = 1; e <= LAT + 2; e++) begin
        clock_edge();
        check_val(model(), "step tracking");
        if (e == LAT - 1 && model() != final_y) begin
          // one edge early the oldest taps do not yet see the step
          checks++;
          if (int'(dataout) == final_y) begin
            failures++;
            $display("step settled early, on edge %0d", e);
          end
        end
        if (e >= LAT) check_val(final_y, "step settled");
      end
    end

    // Random samples and coefficients, occasional resets.
    apply_reset();
    for (int n = 0; n < 400; n++) begin
      if (n > 0) @(negedge clk);
      rst = (n % 100 == 99);
      xin = 4'($urandom);
      if (n % 7 == 0) for (int i = 0; i < NT; i++) h[i] = 4'($urandom);
      hist[0] = int'(xin);
      #1;
      check_val(model(), "random");
      clock_edge();
      if (rst) begin
        // the synchronous reset cleared every delay register on this edge
        for (int d = 1; d <= D; d++) hist[d] = 0;
        rst = 1'b0;
      end
      check_val(model(), "random after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
