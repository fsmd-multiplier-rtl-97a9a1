// Self-checking testbench for the multiplier's control FSM.
//
// Drives random start and done inputs (plus a few asynchronous resets) and
// compares calc and complete every cycle with a reference state machine kept
// in the testbench: IDLE -> RUN on start low, RUN -> FINISH on done,
// FINISH -> IDLE always; calc only in RUN, complete elsewhere. It also checks
// that FINISH lasts exactly one cycle and that every state and transition
// was seen. Inputs change on the falling edge; outputs are checked after the
// rising edge.
module mult_rep_add_fsm_tb;
  import mult_rep_add_pkg::*;

  logic clk = 1'b0;
  logic rstb, startb, done;
  logic calc, complete;

  int checks = 0, failures = 0;
  int n_run = 0, n_finish = 0, n_idle_wait = 0, n_run_wait = 0, n_reset = 0;

  state_t ref_state;

  mult_rep_add_fsm dut (
    .i_clk      (clk),
    .i_rstb     (rstb),
    .i_startb   (startb),
    .i_done     (done),
    .o_calc     (calc),
    .o_complete (complete)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s calc=%0b complete=%0b", what, $time,
               ref_state.name(), calc, complete);
    end
  endtask

  task automatic check_outputs(input string what);
    check(calc == (ref_state == ST_RUN), {what, " calc"});
    check(complete == (ref_state != ST_RUN), {what, " complete"});
  endtask

  initial begin
    rstb = 1'b0; startb = 1'b1; done = 1'b0;
    ref_state = ST_IDLE;
    #1 check_outputs("in reset");
    repeat (2) @(posedge clk);
    #1 check_outputs("held in reset");
    @(negedge clk) rstb = 1'b1;

    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      startb = ($urandom_range(0, 3) != 0);  // start asserted one time in four
      done   = ($urandom_range(0, 2) == 0);
      // Occasional asynchronous reset, released before the next edge
      if ($urandom_range(0, 99) == 0) begin
        #2 rstb = 1'b0;
        #1 ref_state = ST_IDLE;
        check_outputs("async reset");
        n_reset++;
        #1 rstb = 1'b1;
      end
      @(posedge clk);
      unique case (ref_state)
        ST_IDLE:   if (!startb) begin ref_state = ST_RUN; n_run++; end
                   else n_idle_wait++;
        ST_RUN:    if (done) begin ref_state = ST_FINISH; n_finish++; end
                   else n_run_wait++;
        ST_FINISH: ref_state = ST_IDLE;
        default:   ref_state = ST_IDLE;
      endcase
      #1 check_outputs("after edge");
    end

    check(n_run > 0,       "IDLE->RUN seen");
    check(n_finish > 0,    "RUN->FINISH seen");
    check(n_idle_wait > 0, "IDLE hold seen");
    check(n_run_wait > 0,  "RUN hold seen");
    check(n_reset > 0,     "async reset seen");
    $display("runs=%0d finishes=%0d idle_waits=%0d run_waits=%0d resets=%0d",
             n_run, n_finish, n_idle_wait, n_run_wait, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
