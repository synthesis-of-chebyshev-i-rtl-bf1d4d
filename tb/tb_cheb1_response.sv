// tb_cheb1_response -- measures the magnitude response of the folded filter
// and compares it with the Chebyshev type-I magnitude formula.
//
// For nine tones at 0.1 .. 0.9 times half the sample rate, the testbench
// feeds 400 samples of a sine of amplitude 16000/32768 through cheb1_folded
// (default parameters), lets the filter settle for 200 samples, and measures
// the output amplitude over the last 200 samples by correlating with a sine
// and a cosine (200 samples hold a whole number of periods of every tone).
// The expected gain is the analog Chebyshev-I high-pass magnitude mapped by
// the bilinear transform:
//   |H| = 1 / sqrt(1 + eps^2 * C3(x)^2),  C3(x) = 4x^3 - 3x,
//   x = tan(wc/2) / tan(w/2), wc = pi/2, eps^2 = 10^(0.5/10) - 1.
// Checks: each measured gain within 0.0005 of the formula; passband gains
// inside the 0.5 dB ripple band; stopband gain rising monotonically.
module tb_cheb1_response;
  localparam int    DATA_W = 16;
  localparam int    N_TONES = 9, SETTLE = 200, MEAS = 200;
  localparam real   AMP = 16000.0;
  localparam real   PI = 3.14159265358979323846;
  localparam real   TOL = 0.0005;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_in;
  logic                     x_ready;
  logic signed [DATA_W-1:0] y_out;
  logic                     y_valid;

  cheb1_folded dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  real omega;
  int  n_in = 0, n_out = 0;
  real s_acc, c_acc;
  real gain [N_TONES];
  bit  tone_done = 0;

  initial begin : watchdog
    repeat (N_TONES * (SETTLE + MEAS + 10) * 7 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected_gain(real w);
    real eps2, x, c3;
    eps2 = $pow(10.0, 0.05) - 1.0;
    x    = $tan(PI / 4.0) / $tan(w / 2.0);
    c3   = 4.0 * x * x * x - 3.0 * x;
    return 1.0 / $sqrt(1.0 + eps2 * c3 * c3);
  endfunction

  // new input sample after each x_ready cycle
  bit change_x = 0;
  always @(negedge clk) if (rst_n) begin
    if (change_x) begin
      x_in = DATA_W'($rtoi(AMP * $sin(omega * n_in) + (AMP * $sin(omega * n_in) >= 0.0 ? 0.5 : -0.5)));
      change_x = 0;
    end
    if (x_ready) begin
      n_in++;
      change_x = 1;
    end
  end

  // correlate the output; output k belongs to input k
  always @(negedge clk) if (rst_n && y_valid) begin
    if (n_out >= SETTLE && n_out < SETTLE + MEAS) begin
      s_acc += real'(y_out) * $sin(omega * n_out);
      c_acc += real'(y_out) * $cos(omega * n_out);
    end
    n_out++;
    if (n_out == SETTLE + MEAS) tone_done = 1;
  end

  initial begin
    real g, e, pass_min;
    pass_min = 1.0 / $sqrt($pow(10.0, 0.05));
    for (int t = 0; t < N_TONES; t++) begin
      omega = PI * real'(t + 1) / 10.0;
      rst_n = 1'b0; n_in = 0; n_out = 0; s_acc = 0.0; c_acc = 0.0; tone_done = 0;
      change_x = 0;
      x_in = '0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      wait (tone_done);
      g = 2.0 / real'(MEAS) * $sqrt(s_acc * s_acc + c_acc * c_acc) / AMP;
      e = expected_gain(omega);
      gain[t] = g;
      $display("f = %0.1f x fs/2: gain %0.5f, Chebyshev-I formula %0.5f", real'(t + 1) / 10.0, g, e);
      checks++;
      if (g - e > TOL || e - g > TOL) begin
        failures++; $display("FAIL gain off by %0.5f", g - e);
      end
      if (t + 1 >= 5) begin   // passband: at or above the cut-off
        checks++;
        if (g < pass_min - TOL || g > 1.0 + TOL) begin
          failures++; $display("FAIL passband gain outside the 0.5 dB ripple band");
        end
      end else if (t > 0) begin
        checks++;
        if (!(g > gain[t - 1])) begin failures++; $display("FAIL stopband not monotonic"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
