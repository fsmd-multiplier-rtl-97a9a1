// Datapath of the repetitive-addition multiplier.
//
// Multiplies by adding the multiplicand to an accumulator "multiplier" times.
// It holds three registers: the multiplicand, a multiplier that counts down,
// and the double-width result. Each rising edge:
//
//   calc = 0            : load both operands from the inputs, clear result
//   calc = 1, mult != 0 : result += multiplicand, multiplier -= 1
//   calc = 1, mult == 0 : hold (the product is in result)
//
// o_done is combinational: high whenever the multiplier register is zero.
// o_result is the result register. Operands are unsigned.
//
// Timing: after the load cycle, a multiplication with multiplier M takes M
// cycles of calc before done rises, so the latency depends on the data.
//
// As in the original design, the multiplicand register is reloaded from the
// input on every edge, including while calc is high, so the operand must be
// held steady during a multiplication; the registers have no reset, since
// the load with calc low initialises them. The width parameter is this
// design's generalisation of the original 4-bit datapath.
module mult_rep_add_datapath
  import mult_rep_add_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic               i_clk,
  input  logic               i_calc,
  input  logic [WIDTH-1:0]   i_multiplicand,
  input  logic [WIDTH-1:0]   i_multiplier,
  output logic [2*WIDTH-1:0] o_result,
  output logic               o_done
);

  logic [WIDTH-1:0]   multiplicand_q;
  logic [WIDTH-1:0]   multiplier_q, multiplier_next;
  logic [2*WIDTH-1:0] result_q, result_next;

  // Step logic: one addition and one decrement while the multiplier is nonzero
  always_comb begin
    if (multiplier_q == '0) begin
      multiplier_next = multiplier_q;
      result_next     = result_q;
      o_done          = 1'b1;
    end else begin
      multiplier_next = multiplier_q - 1'b1;
      result_next     = result_q + {{WIDTH{1'b0}}, multiplicand_q};
      o_done          = 1'b0;
    end
  end

  // Datapath registers
  always_ff @(posedge i_clk) begin
    multiplicand_q <= i_multiplicand;
    if (!i_calc) begin
      multiplier_q <= i_multiplier;
      result_q     <= '0;
    end else begin
      multiplier_q <= multiplier_next;
      result_q     <= result_next;
    end
  end

  assign o_result = result_q;

endmodule
