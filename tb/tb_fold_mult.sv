// tb_fold_mult -- self-checking testbench of the shared 2-stage multiplier.
// Drives random and corner-case operands every cycle and compares p_out with
// (d*c) >>> 14, wrapped to 24 bits, computed two cycles earlier in the
// testbench (this also checks the two-cycle latency).
module tb_fold_mult;
  localparam int ACC_W = 24, COEF_W = 16, COEF_FRAC = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ACC_W-1:0]  d_in;
  logic signed [COEF_W-1:0] c_in;
  logic signed [ACC_W-1:0]  p_out;
  int checks = 0, failures = 0;
  logic signed [ACC_W-1:0] exp_q[$];

  fold_mult #(.ACC_W(ACC_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic signed [ACC_W-1:0] model(longint d, longint c);
    longint p = (d * c) >>> COEF_FRAC;
    return ACC_W'(p);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_in = '0; c_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // after reset the pipeline holds zeros
    if (p_out !== '0) begin failures++; $display("FAIL reset value %0d", p_out); end
    checks++;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      case (i % 8)
        0: begin d_in = 24'sh7FFFFF; c_in = 16'sh7FFF; end
        1: begin d_in = -24'sh800000; c_in = -16'sh8000; end
        2: begin d_in = -24'sd1; c_in = 16'sd1; end       // truncation toward -inf
        default: begin d_in = ACC_W'($urandom); c_in = COEF_W'($urandom); end
      endcase
      exp_q.push_back(model(d_in, c_in));
      if (i >= 2) begin
        logic signed [ACC_W-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (p_out !== e) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d p_out=%0d expected=%0d", i, p_out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
