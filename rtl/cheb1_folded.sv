// cheb1_folded -- third-order Chebyshev-I high-pass IIR filter (direct form II)
// folded onto one adder and one multiplier.
//
// The unfolded filter computes, per sample,
//   w(n) = x(n) - a1*w(n-1) - a2*w(n-2) - a3*w(n-3)
//   y(n) = b0*w(n) + b1*w(n-1) + b2*w(n-2) + b3*w(n-3)
// with six adders and seven multipliers. Here those thirteen operations share
// one 1-stage adder (fold_add) and one 2-stage multiplier (fold_mult). One
// iteration (one input sample, one output sample) takes N_FOLD = 7 clock
// cycles; fold_ctrl steps through the schedule and fold_regs holds the
// intermediate values in seven registers. The schedule, retiming and register
// allocation are documented in cheb1_pkg.
//
// Interface and timing
//   x_in     signed Q1.15 sample. It is read in step 4 of every iteration,
//            the cycle in which x_ready is high; after that cycle the source
//            may present the next sample (so x_in changes at most once every
//            7 cycles).
//   y_out    signed Q1.15, saturated from the 24-bit internal word; it is
//            updated, and y_valid pulses for one cycle, once per iteration.
//   Latency  y(n) appears 10 cycles after the x_ready cycle that took x(n).
//            The extra iteration comes from retiming the feed-forward adders.
//            The first output after reset is suppressed, because it belongs
//            to the (zero) sample before x(0).
//
// Numbers: 24-bit internal words with the binary point of the Q1.15 input
// (8 guard bits), Q2.14 coefficients, truncated products, wrapping adds.
// Default coefficients: 0.5 dB ripple, cut-off at a quarter of the sample
// rate, b = 0.158919*(1,-3,3,-1), a = (1, 0.126776, 0.523875, 0.125744).
// The filter order, its structure and the folding follow the original
// design; widths, coefficients, reset and the handshake are this design's
// choices. NA1..NA3 are the negated feedback coefficients -a1..-a3.
module cheb1_folded
  import cheb1_pkg::*;
#(
  parameter int DATA_W    = 16,
  parameter int ACC_W     = 24,
  parameter int COEF_W    = 16,
  parameter int COEF_FRAC = 14,
  parameter int B0  = 2604,
  parameter int B1  = -7811,
  parameter int B2  = 7811,
  parameter int B3  = -2604,
  parameter int NA1 = -2077,
  parameter int NA2 = -8583,
  parameter int NA3 = -2060
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     x_ready,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     y_valid
);
  typedef logic signed [ACC_W-1:0] acc_t;

  step_t                        step;
  ctrl_t                        ctrl;
  logic [N_REGS-1:0][ACC_W-1:0] r;
  acc_t                         add_a, add_b, add_out;
  acc_t                         mul_d, mul_out;
  logic signed [COEF_W-1:0]     coef;
  acc_t                         x_ext;
  logic                         primed;

  fold_ctrl u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .ctrl  (ctrl)
  );

  fold_regs #(.ACC_W(ACC_W)) u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .src     (ctrl.reg_src),
    .add_out (add_out),
    .mul_out (mul_out),
    .r       (r)
  );

  fold_add #(.ACC_W(ACC_W)) u_add (
    .clk   (clk),
    .rst_n (rst_n),
    .a_in  (add_a),
    .b_in  (add_b),
    .s_out (add_out)
  );

  fold_mult #(.ACC_W(ACC_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .d_in  (mul_d),
    .c_in  (coef),
    .p_out (mul_out)
  );

  assign x_ext   = acc_t'(x_in);
  assign x_ready = ctrl.x_take;

  // Operand switches in front of the shared units.
  function automatic acc_t operand(op_src_t sel, logic [N_REGS-1:0][ACC_W-1:0] regs,
                                   acc_t sum, acc_t x);
    case (sel)
      OP_ADD:  return sum;
      OP_X:    return x;
      OP_ZERO: return '0;
      default: return regs[int'(sel)];  // OP_R1..OP_R7
    endcase
  endfunction

  always_comb begin
    add_a = operand(ctrl.add_a, r, add_out, x_ext);
    add_b = operand(ctrl.add_b, r, add_out, x_ext);
    mul_d = operand(ctrl.mul_d, r, add_out, x_ext);
  end

  // Coefficient switch.
  always_comb begin
    case (ctrl.coef)
      C_B0:    coef = COEF_W'(B0);
      C_B1:    coef = COEF_W'(B1);
      C_B2:    coef = COEF_W'(B2);
      C_B3:    coef = COEF_W'(B3);
      C_NA1:   coef = COEF_W'(NA1);
      C_NA2:   coef = COEF_W'(NA2);
      default: coef = COEF_W'(NA3);
    endcase
  end

  // Output register with saturation to DATA_W bits.
  localparam acc_t Y_MAX = acc_t'((64'sd1 <<< (DATA_W - 1)) - 1);
  localparam acc_t Y_MIN = acc_t'(-(64'sd1 <<< (DATA_W - 1)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out   <= '0;
      y_valid <= 1'b0;
      primed  <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (ctrl.y_take) begin
        primed <= 1'b1;
        if (primed) begin
          y_valid <= 1'b1;
          if      (add_out > Y_MAX) y_out <= DATA_W'(Y_MAX);
          else if (add_out < Y_MIN) y_out <= DATA_W'(Y_MIN);
          else                      y_out <= DATA_W'(add_out);
        end
      end
    end
  end
endmodule
