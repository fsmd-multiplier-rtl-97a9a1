// Repetitive-addition multiplier: FSM plus datapath (top level).
//
// Multiplies two unsigned WIDTH-bit operands into a 2*WIDTH-bit product by
// adding the multiplicand to an accumulator once per clock, multiplier
// times. The control FSM (mult_rep_add_fsm) drives calc into the datapath
// (mult_rep_add_datapath), which answers with done when its multiplier count
// reaches zero.
//
// Interface: i_clk; i_rstb, active-low asynchronous reset of the FSM;
// i_startb, active-low start; the operands, which must be held steady from
// the start request until o_complete rises again; o_result_latched, the
// product; o_complete, high when the unit is idle or finished.
//
// Timing: with i_startb low at a rising edge while idle, o_complete falls
// after that edge and stays low for M+1 cycles, where M is the multiplier
// (M additions plus the cycle that sees done). While o_complete is low the
// output register follows the datapath accumulator, one cycle behind, so the
// partial sums are visible on o_result_latched; when o_complete rises it
// holds the final product until the next multiplication, because the
// datapath clears its own result when calc falls. The output register has no
// reset, so o_result_latched is undefined until the first multiplication.
//
// Concurrent assertions at the end state the calc/done handshake: calc and
// complete are complementary, calc stays high until done, exactly one
// non-calc (Finish) cycle follows done, and the product is stable after done.
// They use i_rstb, the controller's asynchronous reset, as their disable
// condition, which lint tools note as a net used both asynchronously and
// synchronously; that is intended and changes no logic.
//
// Structure, ports and the output register follow the original design; the
// WIDTH parameter and the assertions are this design's additions.
module mult_rep_add_fsmd
  import mult_rep_add_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic               i_clk,
  input  logic               i_rstb,
  input  logic               i_startb,
  input  logic [WIDTH-1:0]   i_multiplicand,
  input  logic [WIDTH-1:0]   i_multiplier,
  output logic [2*WIDTH-1:0] o_result_latched,
  output logic               o_complete
);

  logic               calc;
  logic               done;
  logic               complete;
  logic [2*WIDTH-1:0] result;

  mult_rep_add_fsm u_fsm (
    .i_clk      (i_clk),
    .i_rstb     (i_rstb),
    .i_startb   (i_startb),
    .i_done     (done),
    .o_calc     (calc),
    .o_complete (complete)
  );

  mult_rep_add_datapath #(
    .WIDTH (WIDTH)
  ) u_datapath (
    .i_clk          (i_clk),
    .i_calc         (calc),
    .i_multiplicand (i_multiplicand),
    .i_multiplier   (i_multiplier),
    .o_result       (result),
    .o_done         (done)
  );

  // Output register: follows the accumulator during a multiplication and
  // holds the product afterwards.
  always_ff @(posedge i_clk) begin
    if (!complete) o_result_latched <= result;
  end

  assign o_complete = complete;

  // Handshake rules between controller and datapath
  a_calc_xor_complete: assert property (@(posedge i_clk) calc != complete)
    else $error("calc and complete must be complementary");
  a_run_until_done: assert property (@(posedge i_clk) disable iff (!i_rstb)
                                     calc && !done |=> calc)
    else $error("calc dropped before the datapath reported done");
  a_stop_after_done: assert property (@(posedge i_clk) disable iff (!i_rstb)
                                      calc && done |=> !calc ##1 !calc)
    else $error("controller did not spend one cycle in Finish after done");
  a_product_held: assert property (@(posedge i_clk) disable iff (!i_rstb)
                                   calc && done |=> $stable(result))
    else $error("datapath result changed after done");

endmodule
