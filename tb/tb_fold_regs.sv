// tb_fold_regs -- self-checking testbench of the register bank R1..R7.
// Every cycle each register gets a random load source (adder, multiplier,
// any register, or hold) and the adder/multiplier inputs get random values.
// A testbench copy of the bank, updated by the same rule, must match the
// outputs after every clock edge; the reset value (all zero) is checked too.
module tb_fold_regs;
  import cheb1_pkg::*;
  localparam int ACC_W = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  reg_src_t [N_REGS-1:0]            src;
  logic [ACC_W-1:0]                 add_out, mul_out;
  logic [N_REGS-1:0][ACC_W-1:0]     r, model, nxt;
  int checks = 0, failures = 0;
  int used [10];

  fold_regs #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = {N_REGS{RS_ADD}};
    add_out = 24'h123456; mul_out = 24'h654321;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (r !== '0) begin failures++; $display("FAIL reset value"); end
    model = '0;
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < N_REGS; k++) begin
        int s;
        s = $urandom_range(9);
        src[k] = reg_src_t'(s);
        used[s]++;
      end
      add_out = ACC_W'($urandom);
      mul_out = ACC_W'($urandom);
      for (int k = 0; k < N_REGS; k++) begin
        if      (src[k] == RS_ADD)  nxt[k] = add_out;
        else if (src[k] == RS_MUL)  nxt[k] = mul_out;
        else if (src[k] == RS_HOLD) nxt[k] = model[k];
        else                        nxt[k] = model[int'(src[k])];
      end
      model = nxt;
      @(negedge clk);
      for (int k = 0; k < N_REGS; k++) begin
        checks++;
        if (r[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d R%0d=%h expected %h (src %s)", i, k + 1, r[k], model[k], src[k].name());
        end
      end
    end
    foreach (used[s]) begin
      checks++;
      if (used[s] == 0) begin failures++; $display("FAIL source %0d never exercised", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
