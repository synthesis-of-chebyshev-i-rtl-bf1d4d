// fold_regs -- the registers R1..R7 that remain after register minimisation.
//
// Every clock edge, each register loads the value selected for it by the
// control word of the current step: the adder output, the multiplier output,
// another register (a forward shift Rk -> Rk+1, or a backward move to a
// lower register) or its own value (hold, used for registers that are free
// in that step). The routing table lives in cheb1_pkg::step_ctrl(). Holding
// a free register is this design's choice. A synchronous active-low reset
// clears all registers, which corresponds to a zero filter state.
module fold_regs
  import cheb1_pkg::*;
#(
  parameter int ACC_W = 24
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  reg_src_t [N_REGS-1:0]             src,
  input  logic     [ACC_W-1:0]              add_out,
  input  logic     [ACC_W-1:0]              mul_out,
  output logic     [N_REGS-1:0][ACC_W-1:0]  r
);
  logic [N_REGS-1:0][ACC_W-1:0] r_next;

  always_comb begin
    for (int k = 0; k < N_REGS; k++) begin
      unique case (src[k])
        RS_ADD:  r_next[k] = add_out;
        RS_MUL:  r_next[k] = mul_out;
        RS_HOLD: r_next[k] = r[k];
        default: r_next[k] = r[int'(src[k])];  // RS_R1..RS_R7
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) r <= '0;
    else        r <= r_next;
  end
endmodule
