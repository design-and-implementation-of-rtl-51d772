// fir_mbff_top_tb: end-to-end test of the three MBFF FIR filters at their
// default sizes (4-bit samples and coefficients, 8-bit output).
//
// A reference model per filter keeps its own sample history and computes
//   y(k) = sum over taps i of H[i] * x(k - DELAY[i])  (mod 256)
// where DELAY[i] is the number of registers in front of tap i:
//   5 taps: 0 0 1 1 2      7 taps: 0 0 1 1 2 2 3      9 taps: 0 0 0 1 1 1 2 2 2
// The test runs, in order:
//  1. the reference operation on the 5-tap filter, xin = 8 and
//     H = 7, 2, 1, 10, 3: output 72, then 160 after the 1st edge and 184
//     from the 2nd edge on;
//  2. step responses on all three filters at once, checking that each output
//     settles exactly on the edge its register depth predicts (2, 3, 2);
//  3. independent random streams on the three filters with coefficient
//     changes and synchronous resets in mid-stream.
// It counts how often each mechanism occurred (reset, settling on the
// predicted edge for each filter, coefficient change, output wrap-around)
// and fails any that never did.
module fir_mbff_top_tb;
  localparam int DELAY5 [5] = '{0, 0, 1, 1, 2};
  localparam int DELAY7 [7] = '{0, 0, 1, 1, 2, 2, 3};
  localparam int DELAY9 [9] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};

  logic clk = 1'b0;
  logic rst;
  logic [3:0] xin5, xin7, xin9;
  logic [4:0][3:0] h5tap;
  logic [6:0][3:0] h7tap;
  logic [8:0][3:0] h9tap;
  logic [7:0] dataout5, dataout7, dataout9;

  int hist5 [3], hist7 [4], hist9 [3];   // [0] = x(k), [d] = x(k-d)
  int checks = 0, failures = 0;
  int n_reset = 0, n_settle5 = 0, n_settle7 = 0, n_settle9 = 0;
  int n_coef = 0, n_wrap = 0;

  fir_mbff_top dut (
    .clk, .rst,
    .xin5, .h5tap, .dataout5,
    .xin7, .h7tap, .dataout7,
    .xin9, .h9tap, .dataout9
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Unwrapped model sums.
  function automatic int sum5();
    int y = 0;
    for (int i = 0; i < 5; i++) y += int'(h5tap[i]) * hist5[DELAY5[i]];
    return y;
  endfunction
  function automatic int sum7();
    int y = 0;
    for (int i = 0; i < 7; i++) y += int'(h7tap[i]) * hist7[DELAY7[i]];
    return y;
  endfunction
  function automatic int sum9();
    int y = 0;
    for (int i = 0; i < 9; i++) y += int'(h9tap[i]) * hist9[DELAY9[i]];
    return y;
  endfunction

  task automatic check_one(input int got, input int exp, input string what);
    checks++;
    if (got != exp % 256) begin
      failures++;
      $display("%0t %s: dataout=%0d expected=%0d", $time, what, got, exp % 256);
    end
    if (exp >= 256) n_wrap++;
  endtask

  task automatic check_all(input string what);
    check_one(int'(dataout5), sum5(), {what, " (5-tap)"});
    check_one(int'(dataout7), sum7(), {what, " (7-tap)"});
    check_one(int'(dataout9), sum9(), {what, " (9-tap)"});
  endtask

  // Step settling: output equals the final value from edge lat on, and
  // differs from it one edge earlier unless the model says it cannot.
  function automatic bit settled(input int s [5], input int m [5], input int f, input int lat);
    bit ok;
    ok = (s[lat] == f % 256) && (s[lat+1] == f % 256);
    if (m[lat-1] != f % 256) ok = ok && (s[lat-1] != f % 256);
    checks++;
    if (!ok) begin
      failures++;
      $display("step did not settle on edge %0d: %0d %0d %0d, final %0d", lat, s[lat-1], s[lat], s[lat+1], f % 256);
    end
    return ok;
  endfunction

  task automatic set_inputs(input int x5, input int x7, input int x9);
    xin5 = 4'(x5); xin7 = 4'(x7); xin9 = 4'(x9);
    hist5[0] = x5; hist7[0] = x7; hist9[0] = x9;
  endtask

  // Rising edge: filters and models shift; a reset clears both.
  task automatic clock_edge();
    @(posedge clk);
    for (int d = 2; d > 0; d--) hist5[d] = hist5[d-1];
    for (int d = 3; d > 0; d--) hist7[d] = hist7[d-1];
    for (int d = 2; d > 0; d--) hist9[d] = hist9[d-1];
    if (rst) begin
      for (int d = 1; d < 3; d++) hist5[d] = 0;
      for (int d = 1; d < 4; d++) hist7[d] = 0;
      for (int d = 1; d < 3; d++) hist9[d] = 0;
      n_reset++;
    end
    #1;
  endtask

  task automatic reset_cycle();
    @(negedge clk);
    rst = 1'b1;
    clock_edge();
    rst = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int f5, f7, f9;
    rst = 1'b1;
    h5tap = '0; h7tap = '0; h9tap = '0;
    for (int d = 0; d < 3; d++) begin hist5[d] = 0; hist9[d] = 0; end
    for (int d = 0; d < 4; d++) hist7[d] = 0;
    set_inputs(0, 0, 0);
    reset_cycle();

    // 1. Reference operation of the 5-tap filter.
    h5tap = {4'd3, 4'd10, 4'd1, 4'd2, 4'd7};
    set_inputs(8, 0, 0);
    #1;
    check_one(int'(dataout5), 72, "reference, before 1st edge");
    clock_edge();
    check_one(int'(dataout5), 160, "reference, after 1st edge");
    clock_edge();
    check_one(int'(dataout5), 184, "reference, after 2nd edge");
    if (dataout5 == 8'd184) n_settle5++;
    clock_edge();
    check_one(int'(dataout5), 184, "reference, after 3rd edge");

    // 2. Step responses: settle on edge 2 (5 taps), 3 (7 taps), 2 (9 taps).
    for (int t = 0; t < 10; t++) begin
      int s5 [5], s7 [5], s9 [5], m5 [5], m7 [5], m9 [5];
      reset_cycle();
      for (int i = 0; i < 5; i++) h5tap[i] = 4'(1 + $urandom_range(14));
      for (int i = 0; i < 7; i++) h7tap[i] = 4'(1 + $urandom_range(14));
      for (int i = 0; i < 9; i++) h9tap[i] = 4'(1 + $urandom_range(14));
      set_inputs(1 + $urandom_range(14), 1 + $urandom_range(14), 1 + $urandom_range(14));
      f5 = 0; f7 = 0; f9 = 0;
      for (int i = 0; i < 5; i++) f5 += int'(h5tap[i]) * int'(xin5);
      for (int i = 0; i < 7; i++) f7 += int'(h7tap[i]) * int'(xin7);
      for (int i = 0; i < 9; i++) f9 += int'(h9tap[i]) * int'(xin9);
      for (int e = 0; e < 5; e++) begin
        if (e > 0) clock_edge();
        else #1;
        check_all("step");
        s5[e] = int'(dataout5); s7[e] = int'(dataout7); s9[e] = int'(dataout9);
        m5[e] = sum5() % 256;   m7[e] = sum7() % 256;   m9[e] = sum9() % 256;
      end
      // Settled on the predicted edge, and stayed there. One edge earlier
      // the oldest taps must still be missing (all H and x are non-zero);
      // the model values m*[e] tell when the missing part wraps to zero.
      if (settled(s5, m5, f5, 2)) n_settle5++;
      if (settled(s7, m7, f7, 3)) n_settle7++;
      if (settled(s9, m9, f9, 2)) n_settle9++;
    end

    // 3. Random streams with coefficient changes and mid-stream resets.
    reset_cycle();
    for (int n = 0; n < 1000; n++) begin
      if (n > 0) @(negedge clk);
      rst = (n % 150 == 149);
      set_inputs($urandom_range(15), $urandom_range(15), $urandom_range(15));
      if (n % 13 == 0) begin
        for (int i = 0; i < 5; i++) h5tap[i] = 4'($urandom);
        for (int i = 0; i < 7; i++) h7tap[i] = 4'($urandom);
        for (int i = 0; i < 9; i++) h9tap[i] = 4'($urandom);
        n_coef++;
      end
      #1;
      check_all("random");
      clock_edge();
      rst = 1'b0;
      check_all("random after edge");
    end

    $display("mechanisms: resets=%0d settle5=%0d settle7=%0d settle9=%0d coef_changes=%0d wraps=%0d",
             n_reset, n_settle5, n_settle7, n_settle9, n_coef, n_wrap);
    if (n_reset   == 0) begin failures++; $display("no synchronous reset happened"); end
    if (n_settle5 == 0) begin failures++; $display("5-tap never settled on edge 2"); end
    if (n_settle7 == 0) begin failures++; $display("7-tap never settled on edge 3"); end
    if (n_settle9 == 0) begin failures++; $display("9-tap never settled on edge 2"); end
    if (n_coef    == 0) begin failures++; $display("no coefficient change happened"); end
    if (n_wrap    == 0) begin failures++; $display("no output wrap-around happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
