// tb_fold_ctrl -- self-checking testbench of the folding controller.
//
// Instead of comparing the control words with a copy of the table, the
// testbench follows "tags" (node number, sample index) through a model of the
// datapath that obeys the control words: the adder output register, the two
// multiplier stages and the registers R1..R7. In every step it checks that the
// adder and the multiplier receive exactly the operands the filter's data-flow
// graph asks for:
//   adder nodes      1: x(n)+n3   2: n7+n4   3: n8+n5   4: n9+n6
//                    5: n10+n12   6: n11+n13
//   multiplier nodes 7..13: coefficient times w(n-k), k = 0,1,1,2,2,3,3
// where a node scheduled in hardware iteration J works on sample
// n = J - r(node) (retiming r(2)=r(4)=r(6)=1, r(10)=r(12)=-1, others 0).
// It also checks the step sequence, the 7-cycle period and the strobes.
module tb_fold_ctrl;
  import cheb1_pkg::*;

  typedef struct { int node; int n; } tag_t;   // node 0 = x input, -1 = none
  localparam int NONE = -1, XIN = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  step_t step;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  fold_ctrl dut (.*);

  always #5 clk = ~clk;

  // Schedule of the design under test, written from the data-flow graph.
  int add_node [7] = '{6, 5, 4, 3, 1, 2, NONE};
  int mul_node [7] = '{8, 13, 9, 12, 11, 10, 7};

  function automatic int rt(int node);   // retiming value r(node)
    case (node)
      2, 4, 6: return 1;
      10, 12:  return -1;
      default: return 0;
    endcase
  endfunction

  function automatic int w_lag(int node); // delays on edge 1 -> multiplier node
    case (node)
      7: return 0; 8, 9: return 1; 10, 11: return 2; default: return 3;
    endcase
  endfunction

  function automatic coef_sel_t coef_of(int node);
    case (node)
      7: return C_B0;  9: return C_B1;  11: return C_B2; 13: return C_B3;
      8: return C_NA1; 10: return C_NA2; default: return C_NA3;
    endcase
  endfunction

  tag_t regs [N_REGS];
  tag_t add_t, mul1_t, mul2_t;
  int   iter = 0;

  function automatic tag_t mk(int node, int n);
    tag_t t; t.node = node; t.n = n; return t;
  endfunction

  function automatic tag_t op_tag(op_src_t sel, int j);
    case (sel)
      OP_ADD:  return add_t;
      OP_X:    return mk(XIN, j);
      OP_ZERO: return mk(NONE, 0);
      default: return regs[int'(sel)];
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL iter=%0d step=%0d: %s", iter, step, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tag_t a, b, m, nregs [N_REGS];
    int   an, mn, n;
    for (int k = 0; k < N_REGS; k++) regs[k] = mk(NONE, 0);
    add_t = mk(NONE, 0); mul1_t = mk(NONE, 0); mul2_t = mk(NONE, 0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 7 * 60; cyc++) begin
      @(negedge clk);
      iter = cyc / 7;
      check(step == step_t'(cyc % 7), $sformatf("step %0d, expected %0d", step, cyc % 7));
      check(ctrl.x_take  == (cyc % 7 == 4), "x_take strobe");
      check(ctrl.y_take  == (cyc % 7 == 6), "y_take strobe");
      check(ctrl.null_op == (cyc % 7 == 6), "null operation slot");
      an = add_node[cyc % 7];
      mn = mul_node[cyc % 7];
      a  = op_tag(ctrl.add_a, iter);
      b  = op_tag(ctrl.add_b, iter);
      m  = op_tag(ctrl.mul_d, iter);
      if (iter >= 5) begin
        // adder operands
        if (an != NONE) begin
          int u1, u2;
          n = iter - rt(an);
          case (an)
            1: begin u1 = XIN; u2 = 3;  end
            2: begin u1 = 7;   u2 = 4;  end
            3: begin u1 = 8;   u2 = 5;  end
            4: begin u1 = 9;   u2 = 6;  end
            5: begin u1 = 10;  u2 = 12; end
            default: begin u1 = 11; u2 = 13; end
          endcase
          check(((a.node == u1 && b.node == u2) || (a.node == u2 && b.node == u1))
                && a.n == n && b.n == n,
                $sformatf("adder node %0d got (%0d,%0d)+(%0d,%0d), wants nodes %0d,%0d of sample %0d",
                          an, a.node, a.n, b.node, b.n, u1, u2, n));
        end
        // multiplier operands
        n = iter - rt(mn);
        check(m.node == 1 && m.n == n - w_lag(mn),
              $sformatf("multiplier node %0d got (%0d,%0d), wants w(%0d)", mn, m.node, m.n, n - w_lag(mn)));
        check(ctrl.coef == coef_of(mn), $sformatf("coefficient of node %0d", mn));
        // output: the adder register holds y of sample iter-1 in step 6
        if (ctrl.y_take) check(add_t.node == 2 && add_t.n == iter - 1, "y_take sees y(n-1)");
      end
      // advance the tag model by one clock edge
      for (int k = 0; k < N_REGS; k++) begin
        case (ctrl.reg_src[k])
          RS_ADD:  nregs[k] = add_t;
          RS_MUL:  nregs[k] = mul2_t;
          RS_HOLD: nregs[k] = regs[k];
          default: nregs[k] = regs[int'(ctrl.reg_src[k])];
        endcase
      end
      regs   = nregs;
      mul2_t = mul1_t;
      mul1_t = mk(mn, iter - rt(mn));
      add_t  = (an == NONE) ? mk(NONE, 0) : mk(an, iter - rt(an));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
