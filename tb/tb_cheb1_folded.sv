// tb_cheb1_folded -- end-to-end testbench of the folded Chebyshev-I filter,
// at the default parameters.
//
// A reference model of the unfolded direct-form-II filter (same word widths,
// same truncation, written independently of the folded datapath) computes
// every output. The testbench feeds one sample per x_ready pulse and checks:
//   * every y_out against the reference, bit for bit;
//   * the latency (y_valid exactly 10 cycles after the x_ready cycle of the
//     same sample) and the rate (x_ready and y_valid every 7 cycles);
//   * the filter's behaviour: a constant input is rejected (high-pass) and an
//     alternating input at half the sample rate passes with unit gain within
//     the 0.5 dB ripple.
// It also counts how often the mechanisms of the folded design are used --
// the idle adder slot, forward register shifts, backward register moves, the
// zero-delay reuse of the adder output, input and output strobes, and output
// saturation -- and counts a failure for any that never happens.
module tb_cheb1_folded;
  import cheb1_pkg::*;
  localparam int DATA_W = 16, ACC_W = 24, COEF_FRAC = 14;
  localparam int B0 = 2604, B1 = -7811, B2 = 7811, B3 = -2604;
  localparam int NA1 = -2077, NA2 = -8583, NA3 = -2060;
  localparam int LATENCY = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_in;
  logic                     x_ready;
  logic signed [DATA_W-1:0] y_out;
  logic                     y_valid;

  cheb1_folded dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model (unfolded direct form II) ------------
  longint w1 = 0, w2 = 0, w3 = 0;

  function automatic longint wrap(longint v);
    return longint'(signed'(ACC_W'(v)));
  endfunction
  function automatic longint mulq(longint d, int c);
    return wrap((d * c) >>> COEF_FRAC);
  endfunction

  int sat_events = 0;
  function automatic int ref_step(int x);
    longint w, y;
    w = wrap(longint'(x) + wrap(mulq(w1, NA1) + wrap(mulq(w2, NA2) + mulq(w3, NA3))));
    y = wrap(mulq(w, B0) + wrap(mulq(w1, B1) + wrap(mulq(w2, B2) + mulq(w3, B3))));
    w3 = w2; w2 = w1; w1 = w;
    if (y > 32767)  begin y = 32767;  sat_events++; end
    if (y < -32768) begin y = -32768; sat_events++; end
    return int'(y);
  endfunction

  // ---------------- stimulus ------------------------------------------------
  localparam int N_IMP = 40, N_RND = 300, N_DC = 200, N_NYQ = 200, N_BIG = 200;
  localparam int N_TOTAL = N_IMP + N_RND + N_DC + N_NYQ + N_BIG;

  function automatic int stim(int k);
    if (k < N_IMP) return (k == 0) ? 16384 : 0;
    k -= N_IMP;
    if (k < N_RND) return $signed($urandom_range(32768)) - 16384;
    k -= N_RND;
    if (k < N_DC) return 8000;
    k -= N_DC;
    if (k < N_NYQ) return (k % 2 == 0) ? 16384 : -16384;
    return ($urandom_range(1) != 0) ? 32767 : -32768;   // full-scale noise
  endfunction

  int exp_y [$];
  int exp_cyc [$];
  int got_y [N_TOTAL];
  int n_in = 0, n_out = 0;
  int last_x_cyc = -1, last_y_cyc = -1;
  bit change_x = 0;

  // ---------------- mechanism counters ------------------------------------
  int cnt_null = 0, cnt_fwd = 0, cnt_bwd = 0, cnt_zero_delay = 0, cnt_add = 0, cnt_mul = 0;

  always @(negedge clk) if (rst_n) begin
    ctrl_t c;
    c = dut.ctrl;
    if (c.null_op) cnt_null++; else cnt_add++;
    cnt_mul++;
    if (c.add_a == OP_ADD || c.add_b == OP_ADD) cnt_zero_delay++;
    for (int k = 0; k < N_REGS; k++) begin
      if (c.reg_src[k] <= RS_R7) begin
        if (int'(c.reg_src[k]) == k - 1) cnt_fwd++;
        else if (int'(c.reg_src[k]) > k) cnt_bwd++;
      end
    end
  end

  // input side: one new sample after each x_ready cycle
  always @(negedge clk) if (rst_n) begin
    if (change_x) begin
      x_in = (n_in < N_TOTAL) ? DATA_W'(stim(n_in)) : '0;
      change_x = 0;
    end
    if (x_ready) begin
      if (last_x_cyc >= 0) begin
        checks++;
        if (cyc - last_x_cyc != N_FOLD) begin
          failures++; $display("FAIL x_ready period %0d", cyc - last_x_cyc);
        end
      end
      last_x_cyc = cyc;
      exp_y.push_back(ref_step(int'(x_in)));
      exp_cyc.push_back(cyc + LATENCY);
      n_in++;
      change_x = 1;
    end
  end

  // output side
  always @(negedge clk) if (rst_n && y_valid) begin
    int e, ec;
    checks += 2;
    if (exp_y.size() == 0) begin
      failures++; $display("FAIL output without input at cycle %0d", cyc);
    end else begin
      e  = exp_y.pop_front();
      ec = exp_cyc.pop_front();
      if (int'(y_out) != e) begin
        failures++;
        if (failures < 20) $display("FAIL sample %0d: y=%0d expected %0d", n_out, y_out, e);
      end
      if (cyc != ec) begin
        failures++;
        if (failures < 20) $display("FAIL sample %0d: at cycle %0d, expected cycle %0d", n_out, cyc, ec);
      end
    end
    if (last_y_cyc >= 0) begin
      checks++;
      if (cyc - last_y_cyc != N_FOLD) begin failures++; $display("FAIL y_valid period"); end
    end
    last_y_cyc = cyc;
    if (n_out < N_TOTAL) got_y[n_out] = int'(y_out);
    n_out++;
  end

  initial begin : watchdog
    repeat (7 * N_TOTAL + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d outputs", n_out, N_TOTAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int mx, mn, k0;
    x_in = DATA_W'(stim(0));
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_out == N_TOTAL);
    @(negedge clk);
    // impulse response: first output is b0 * 16384 >> 14 = b0
    expect_true(got_y[0] == B0, $sformatf("impulse response h(0)=%0d, expected %0d", got_y[0], B0));
    // DC is rejected: last 50 outputs of the constant block are near zero
    k0 = N_IMP + N_RND + N_DC - 50;
    mx = 0;
    for (int k = k0; k < k0 + 50; k++) if ((got_y[k] < 0 ? -got_y[k] : got_y[k]) > mx) mx = (got_y[k] < 0 ? -got_y[k] : got_y[k]);
    expect_true(mx < 40, $sformatf("DC not rejected, |y| up to %0d", mx));
    // half the sample rate passes with gain in [-0.5 dB, 0 dB] (+ rounding)
    k0 = N_IMP + N_RND + N_DC + N_NYQ - 50;
    mx = 0; mn = 1 << 30;
    for (int k = k0; k < k0 + 50; k++) begin
      int a;
      a = got_y[k] < 0 ? -got_y[k] : got_y[k];
      if (a > mx) mx = a;
      if (a < mn) mn = a;
    end
    expect_true(mn >= 15400 && mx <= 16400, $sformatf("gain at fs/2 outside the ripple band: |y| %0d..%0d", mn, mx));
    // mechanism coverage
    $display("mechanisms: adds=%0d muls=%0d null_slots=%0d forward_shifts=%0d backward_moves=%0d zero_delay_reuse=%0d inputs=%0d outputs=%0d saturations=%0d",
             cnt_add, cnt_mul, cnt_null, cnt_fwd, cnt_bwd, cnt_zero_delay, n_in, n_out, sat_events);
    expect_true(cnt_null > 0, "idle adder slot never used");
    expect_true(cnt_fwd > 0, "no forward register shift");
    expect_true(cnt_bwd > 0, "no backward register move");
    expect_true(cnt_zero_delay > 0, "adder output never reused directly");
    expect_true(sat_events > 0, "output saturation never exercised");
    // (the run may stop part-way through an iteration)
    expect_true(cnt_mul - 7 * cnt_null inside {[-6:6]}, "not 7 multiplications per idle adder slot");
    expect_true(cnt_add - 6 * cnt_null inside {[-6:6]}, "not 6 additions per idle adder slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
