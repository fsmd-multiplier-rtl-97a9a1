// Self-checking testbench for the repetitive-addition datapath.
//
// For every pair of 4-bit operands (and a random sample at a wider width,
// through a second instance) it loads the operands with calc low, raises
// calc and counts the cycles until done. It checks that done comes after
// exactly M calc cycles (M = multiplier), that the accumulator shows
// a*k after k cycles, that the final result equals a*M, that the result
// holds while calc stays high after done, and that lowering calc clears the
// result. Inputs change on the falling edge; outputs are read after the
// rising edge.
module mult_rep_add_datapath_tb;

  localparam int unsigned W4 = 4;
  localparam int unsigned W8 = 8;

  logic clk = 1'b0;
  logic calc4, calc8;
  logic [W4-1:0] a4, m4;
  logic [W8-1:0] a8, m8;
  logic [2*W4-1:0] r4;
  logic [2*W8-1:0] r8;
  logic done4, done8;

  int checks = 0, failures = 0;
  int n_zero = 0, n_max = 0;

  mult_rep_add_datapath dut4 (
    .i_clk (clk), .i_calc (calc4), .i_multiplicand (a4), .i_multiplier (m4),
    .o_result (r4), .o_done (done4)
  );

  mult_rep_add_datapath #(.WIDTH(W8)) dut8 (
    .i_clk (clk), .i_calc (calc8), .i_multiplicand (a8), .i_multiplier (m8),
    .o_result (r8), .o_done (done8)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run4(input int unsigned a, input int unsigned m);
    int unsigned k;
    @(negedge clk);
    calc4 = 1'b0; a4 = W4'(a); m4 = W4'(m);
    @(posedge clk); #1;
    check(r4 == 0, "W4 result cleared by load");
    check(done4 == (m == 0), "W4 done right after load");
    @(negedge clk) calc4 = 1'b1;
    k = 0;
    while (!done4 && k <= m) begin
      @(posedge clk); #1;
      k++;
      check(r4 == (2*W4)'(a * k), $sformatf("W4 partial sum %0d*%0d", a, k));
    end
    check(k == m, $sformatf("W4 %0d*%0d took %0d cycles", a, m, k));
    check(done4, "W4 done");
    check(r4 == (2*W4)'(a * m), $sformatf("W4 product %0d*%0d = %0d", a, m, r4));
    repeat (2) @(posedge clk);
    #1 check(r4 == (2*W4)'(a * m) && done4, "W4 product held with calc high");
    if (m == 0) n_zero++;
    if (m == 2**W4 - 1) n_max++;
  endtask

  task automatic run8(input int unsigned a, input int unsigned m);
    int unsigned k;
    @(negedge clk);
    calc8 = 1'b0; a8 = W8'(a); m8 = W8'(m);
    @(posedge clk); #1;
    check(r8 == 0, "W8 result cleared by load");
    @(negedge clk) calc8 = 1'b1;
    k = 0;
    while (!done8 && k <= m) begin
      @(posedge clk); #1;
      k++;
    end
    check(k == m, $sformatf("W8 %0d*%0d took %0d cycles", a, m, k));
    check(r8 == (2*W8)'(a * m), $sformatf("W8 product %0d*%0d = %0d", a, m, r8));
  endtask

  initial begin
    calc4 = 1'b0; calc8 = 1'b0;
    a4 = '0; m4 = '0; a8 = '0; m8 = '0;
    for (int unsigned a = 0; a < 2**W4; a++)
      for (int unsigned m = 0; m < 2**W4; m++)
        run4(a, m);
    run8(255, 255);
    run8(0, 200);
    run8(200, 0);
    for (int i = 0; i < 20; i++)
      run8($urandom_range(0, 255), $urandom_range(0, 255));
    check(n_zero > 0, "zero multiplier case seen");
    check(n_max > 0, "largest multiplier case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
