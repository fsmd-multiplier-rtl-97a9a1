// End-to-end self-checking testbench for the repetitive-addition multiplier.
//
// Runs the top level at its default parameters (4-bit operands). It first
// replays the operand sequence of the reference waveform (0*4, 1*1, 4*0,
// 15*15, 9*5), then every one of the 256 operand pairs, then two special
// cases: a start request held low across the end of a multiplication (so
// the next one begins straight away) and an asynchronous reset in the middle
// of a multiplication. For each multiplication it checks:
//   - o_complete falls after the start edge and stays low exactly M+1 cycles;
//   - while it is low, o_result_latched shows the partial sums 0, a, 2a, ...;
//   - when it rises, o_result_latched equals a*M (computed here);
//   - the product is held while the unit is idle.
// It counts how often each mechanism happened (zero multiplier, partial sum
// shown, product held while idle, back-to-back start, reset abort) and fails
// if one never did. Inputs change on the falling clock edge; outputs are
// read 1 time unit after the rising edge.
module mult_rep_add_fsmd_tb;

  localparam int unsigned W = 4;

  logic clk = 1'b0;
  logic rstb, startb;
  logic [W-1:0] a, m;
  logic [2*W-1:0] result;
  logic complete;

  int checks = 0, failures = 0;
  int n_mult = 0, n_zero = 0, n_partial = 0, n_hold = 0, n_b2b = 0, n_abort = 0;

  mult_rep_add_fsmd dut (
    .i_clk            (clk),
    .i_rstb           (rstb),
    .i_startb         (startb),
    .i_multiplicand   (a),
    .i_multiplier     (m),
    .o_result_latched (result),
    .o_complete       (complete)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (result=%0d complete=%0b)", what, $time, result, complete);
    end
  endtask

  // One multiplication from an idle unit. With keep_start set, startb is
  // left low at the end so that the next multiplication starts at once.
  task automatic multiply(input int unsigned ai, input int unsigned mi,
                          input bit keep_start = 1'b0);
    int unsigned k;
    logic [2*W-1:0] expect_p;
    expect_p = (2*W)'(ai * mi);
    @(negedge clk);
    a = W'(ai); m = W'(mi); startb = 1'b0;
    @(posedge clk); #1;
    check(!complete, $sformatf("%0d*%0d started", ai, mi));
    @(negedge clk) startb = 1'b1;
    k = 0;
    do begin
      @(posedge clk); #1;
      k++;
      check(result == (2*W)'(ai * (k - 1)),
            $sformatf("%0d*%0d partial sum after %0d cycles", ai, mi, k));
      if (k >= 3 && k <= mi) n_partial++;
      if (keep_start && complete) begin
        @(negedge clk) startb = 1'b0;
      end
    end while (!complete && k <= mi + 2);
    check(k == mi + 1, $sformatf("%0d*%0d complete low %0d cycles, expected %0d",
                                 ai, mi, k, mi + 1));
    check(result == expect_p, $sformatf("%0d*%0d product %0d, expected %0d",
                                        ai, mi, result, expect_p));
    n_mult++;
    if (mi == 0) n_zero++;
    if (!keep_start) begin
      // FINISH and one IDLE cycle: product held, complete high
      repeat (2) begin
        @(posedge clk); #1;
        check(complete && result == expect_p, $sformatf("%0d*%0d product held", ai, mi));
      end
      n_hold++;
    end
  endtask

  initial begin
    logic [2*W-1:0] prev_p;
    rstb = 1'b0; startb = 1'b1; a = '0; m = '0;
    repeat (2) @(posedge clk);
    #1 check(complete, "complete high in reset");
    @(negedge clk) rstb = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(complete, "idle without start");

    // Operand sequence of the reference waveform
    multiply(0, 4);
    multiply(1, 1);
    multiply(4, 0);
    multiply(15, 15);
    multiply(9, 5);

    // All operand pairs
    for (int unsigned ai = 0; ai < 2**W; ai++)
      for (int unsigned mi = 0; mi < 2**W; mi++)
        multiply(ai, mi);

    // Start held low over the end of a multiplication: FINISH, IDLE, then
    // the next multiplication begins with complete high for two cycles.
    multiply(7, 3, 1'b1);
    @(posedge clk); #1;
    check(complete, "back-to-back: FINISH");
    @(posedge clk); #1;
    check(!complete, "back-to-back: restarted from IDLE");
    @(negedge clk) startb = 1'b1;
    // RUN lasts M+1 = 4 cycles from the restart edge
    repeat (4) begin
      @(posedge clk); #1;
    end
    check(complete && result == 8'd21, "back-to-back: second product 7*3");
    n_b2b++;
    repeat (2) @(posedge clk);

    // Asynchronous reset in the middle of 13*12
    @(negedge clk);
    a = 4'd13; m = 4'd12; startb = 1'b0;
    @(negedge clk) startb = 1'b1;
    repeat (4) @(negedge clk);
    check(!complete, "abort: running before reset");
    prev_p = result;
    #2 rstb = 1'b0;
    #1 check(complete, "abort: complete rises with reset");
    @(posedge clk); #1;
    check(complete && result == prev_p, "abort: output register holds partial sum");
    @(negedge clk) rstb = 1'b1;
    n_abort++;
    multiply(13, 12);

    check(n_zero > 0,    "mechanism: zero multiplier");
    check(n_partial > 0, "mechanism: partial sums shown");
    check(n_hold > 0,    "mechanism: product held while idle");
    check(n_b2b > 0,     "mechanism: back-to-back start");
    check(n_abort > 0,   "mechanism: reset abort");
    $display("multiplications=%0d zero_multiplier=%0d partial_sums=%0d holds=%0d back_to_back=%0d aborts=%0d",
             n_mult, n_zero, n_partial, n_hold, n_b2b, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
