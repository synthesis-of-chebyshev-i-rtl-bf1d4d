// tb_fold_add -- self-checking testbench of the shared 1-stage adder.
// Random and overflowing operands every cycle; s_out must equal the wrapped
// 24-bit sum of the operands applied one cycle earlier.
module tb_fold_add;
  localparam int ACC_W = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ACC_W-1:0] a_in, b_in, s_out, exp_s;
  int checks = 0, failures = 0;

  fold_add #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_in = 24'sd5; b_in = 24'sd7;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s_out !== '0) begin failures++; $display("FAIL reset value %0d", s_out); end
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 5 == 0) begin a_in = 24'sh7FFFFF; b_in = 24'sd3; end
      else begin a_in = ACC_W'($urandom); b_in = ACC_W'($urandom); end
      exp_s = ACC_W'(longint'(a_in) + longint'(b_in));
      @(negedge clk);
      checks++;
      if (s_out !== exp_s) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d exp=%0d", a_in, b_in, s_out, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
