// cheb1_pkg -- shared constants, types and the folding schedule of the folded
// third-order Chebyshev-I high-pass filter.
//
// The filter's data-flow graph has six additions (nodes 1-6) and seven
// multiplications (nodes 7-13). All of them are time-multiplexed onto one
// adder (1 pipeline stage) and one multiplier (2 pipeline stages) with a
// folding factor of N_FOLD = 7 clock cycles per input sample:
//
//   step            0    1    2    3    4    5    6
//   adder node      6    5    4    3    1    2    (null)
//   multiplier node 8    13   9    12   11   10   7
//
// Node roles (w is the direct-form-II state):
//   1: w(n)  = x(n) + n3          7: b0*w(n)      8: -a1*w(n-1)
//   3: n8 + n5                    9: b1*w(n-1)   10: -a2*w(n-2)
//   5: n10 + n12                 11: b2*w(n-2)   12: -a3*w(n-3)
//   6: n11 + n13                 13: b3*w(n-3)
//   4: n9 + n6      2: y(n) = n7 + n4
//
// The step order comes from the folding sets of the original design. Using
// seven steps, rather than six, is this design's choice: seven
// multiplications cannot share one multiplier in six cycles. Retiming values
// r(2)=r(4)=r(6)=1, r(10)=r(12)=-1 (all others 0) make every folded delay
// D_F(U->V) = N*w_r(e) - P_U + v - u non-negative. Lifetime analysis of the
// folded delays gives at most seven live values at one step, so seven
// registers R1..R7 are kept. Values move between them by forward-backward
// allocation: a value normally shifts Rk -> Rk+1 each cycle, and is moved back
// to the lowest free register when it reaches R7 while still needed.
// step_ctrl() below is that allocation, step by step.
package cheb1_pkg;

  localparam int N_FOLD = 7;   // clock cycles per input sample
  localparam int N_REGS = 7;   // registers left after register minimisation
  localparam int STEP_W = 3;

  typedef logic [STEP_W-1:0] step_t;

  // Load source of one register for the coming clock edge.
  typedef enum logic [3:0] {
    RS_R1 = 4'd0, RS_R2 = 4'd1, RS_R3 = 4'd2, RS_R4 = 4'd3,
    RS_R5 = 4'd4, RS_R6 = 4'd5, RS_R7 = 4'd6,
    RS_ADD = 4'd7, RS_MUL = 4'd8, RS_HOLD = 4'd9
  } reg_src_t;

  // Source of an operand of the adder or the multiplier's data input.
  typedef enum logic [3:0] {
    OP_R1 = 4'd0, OP_R2 = 4'd1, OP_R3 = 4'd2, OP_R4 = 4'd3,
    OP_R5 = 4'd4, OP_R6 = 4'd5, OP_R7 = 4'd6,
    OP_ADD = 4'd7, OP_X = 4'd8, OP_ZERO = 4'd9
  } op_src_t;

  // Coefficient fed to the multiplier. Feedback coefficients are negated so
  // that every node of the graph is a plain addition.
  typedef enum logic [2:0] {
    C_B0 = 3'd0, C_B1 = 3'd1, C_B2 = 3'd2, C_B3 = 3'd3,
    C_NA1 = 3'd4, C_NA2 = 3'd5, C_NA3 = 3'd6
  } coef_sel_t;

  typedef struct packed {
    reg_src_t [N_REGS-1:0] reg_src;  // reg_src[k] loads register R(k+1)
    op_src_t               add_a;
    op_src_t               add_b;
    op_src_t               mul_d;
    coef_sel_t             coef;
    logic                  x_take;   // adder reads x_in in this step
    logic                  y_take;   // adder output holds y in this step
    logic                  null_op;  // adder slot unused in this step
  } ctrl_t;

  // Control word of each folding step.
  function automatic ctrl_t step_ctrl(step_t s);
    ctrl_t c;
    c.reg_src = {N_REGS{RS_HOLD}};
    c.reg_src[0] = RS_MUL;            // every product enters R1
    c.add_a   = OP_ZERO;
    c.add_b   = OP_ZERO;
    c.mul_d   = OP_ZERO;
    c.coef    = C_B0;
    c.x_take  = 1'b0;
    c.y_take  = 1'b0;
    c.null_op = 1'b0;
    case (s)
      3'd0: begin  // add 6 = n11 + n13, mul 8 = -a1*w(n-1)
        c.add_a = OP_R1; c.add_b = OP_R4;
        c.mul_d = OP_R5; c.coef = C_NA1;
        c.reg_src[1] = RS_R7; c.reg_src[2] = RS_R2; c.reg_src[3] = RS_R3;
        c.reg_src[5] = RS_R5; c.reg_src[6] = RS_R6;
      end
      3'd1: begin  // add 5 = n10 + n12, mul 13 = b3*w(n-3)
        c.add_a = OP_R1; c.add_b = OP_R3;
        c.mul_d = OP_R2; c.coef = C_B3;
        c.reg_src[1] = RS_ADD; c.reg_src[2] = RS_R7; c.reg_src[4] = RS_R4;
        c.reg_src[6] = RS_R6;
      end
      3'd2: begin  // add 4 = n9 + n6, mul 9 = b1*w(n-1)
        c.add_a = OP_R5; c.add_b = OP_R2;
        c.mul_d = OP_R7; c.coef = C_B1;
        c.reg_src[1] = RS_R1; c.reg_src[2] = RS_ADD; c.reg_src[3] = RS_R3;
        c.reg_src[4] = RS_R7;
      end
      3'd3: begin  // add 3 = n8 + n5, mul 12 = -a3*w(n-3)
        c.add_a = OP_R1; c.add_b = OP_R3;
        c.mul_d = OP_R4; c.coef = C_NA3;
        c.reg_src[1] = RS_ADD; c.reg_src[2] = RS_R2; c.reg_src[4] = RS_R4;
        c.reg_src[5] = RS_R5;
      end
      3'd4: begin  // add 1 = x(n) + n3 -> w(n), mul 11 = b2*w(n-2)
        c.add_a = OP_X; c.add_b = OP_ADD;
        c.mul_d = OP_R5; c.coef = C_B2;
        c.x_take = 1'b1;
        c.reg_src[1] = RS_R1; c.reg_src[2] = RS_R2; c.reg_src[3] = RS_R3;
        c.reg_src[5] = RS_R5; c.reg_src[6] = RS_R6;
      end
      3'd5: begin  // add 2 = n7 + n4 -> y, mul 10 = -a2*w(n-2)
        c.add_a = OP_R4; c.add_b = OP_R3;
        c.mul_d = OP_R7; c.coef = C_NA2;
        c.reg_src[1] = RS_R1; c.reg_src[2] = RS_R2; c.reg_src[3] = RS_ADD;
        c.reg_src[4] = RS_R7; c.reg_src[6] = RS_R6;
      end
      3'd6: begin  // adder idle, mul 7 = b0*w(n); adder output is y
        c.null_op = 1'b1;
        c.y_take  = 1'b1;
        c.mul_d = OP_R4; c.coef = C_B0;
        c.reg_src[1] = RS_R1; c.reg_src[2] = RS_R2; c.reg_src[3] = RS_R3;
        c.reg_src[4] = RS_R4; c.reg_src[5] = RS_R5;
      end
      default: ;
    endcase
    return c;
  endfunction

endpackage
