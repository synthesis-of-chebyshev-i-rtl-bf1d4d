// fold_ctrl -- control circuit of the folded filter.
//
// A modulo-N_FOLD step counter runs freely after reset; the step number is
// decoded by cheb1_pkg::step_ctrl() into the control word of that step: the
// operand switches of the adder and the multiplier, the coefficient, the load
// source of each of the registers R1..R7 (the register allocation table) and
// the input/output strobes. Step 0 is the cycle after reset is released.
// The counter-plus-table form of the control is this design's choice; the
// schedule it encodes follows the folding sets and is described in
// cheb1_pkg.
module fold_ctrl
  import cheb1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output step_t step,
  output ctrl_t ctrl
);
  always_ff @(posedge clk) begin
    if (!rst_n)                            step <= '0;
    else if (step == step_t'(N_FOLD - 1))  step <= '0;
    else                                   step <= step + step_t'(1);
  end

  always_comb ctrl = step_ctrl(step);

  // The counter never leaves the range of the schedule.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 step < step_t'(N_FOLD));
endmodule
