// tb_freq_response: frequency-response sweep of the benchmark lattice filter (lattice_odlf at
// its default sizes: 10-bit operators, extra LSBs 0,2,0 / 1,0, one clock per sample at 39 MHz).
//
// A sigma-delta sine of amplitude 0.1 around the working point U0 = 3/4 (bias RI0 = 1/2) is
// applied at each frequency. After the transients have settled, the direct output is correlated
// with sine and cosine over a whole number of periods, and 2 |y_lp| / |x| is compared with
// the analytic response of the quantized-coefficient elliptic filter, worked out from the state
// equations with the integrator gain fs/1024:
//   pass band and transition band (2 - 4.25 kHz): within 1 dB;
//   stop band (4.5 - 20 kHz): within 3 dB, where the measurement floor of the one-bit output
//   and the quantization of the filter states dominate.
// It also checks the G.712 mask that the filter is designed for: at most 0.25 dB of loss up to
// 3 kHz (the mask allows +-0.125 dB; 0.125 dB of margin is for measurement noise), at least
// 14 dB of attenuation from 4 to 4.6 kHz and at least 32 dB above.
module tb_freq_response;
  import odlf_pkg::*;
  localparam real FS = 39.0e6;
  localparam int  NF = 12;
  localparam real FREQ [NF] = '{2.0e3, 2.5e3, 3.0e3, 3.25e3, 3.5e3, 3.75e3, 4.0e3, 4.25e3,
                                4.5e3, 5.0e3, 10.0e3, 20.0e3};
  localparam real HREF [NF] = '{-0.0440, -0.0054, -0.0491, -0.5149, -2.9505, -8.5639, -15.9088,
                                -24.4178, -36.1289, -40.0238, -33.5727, -35.5171};
  localparam int unsigned CNUM [5] = '{9, 16, 16, 16, 9};

  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, bias, y_lp, y_sum;
  logic [4:0] coef;
  logic [2:0] w_a, sat_a;
  logic [1:0] w_b, sat_b;
  logic [NBITS_DEFAULT-1:0] x_a [3];
  logic [NBITS_DEFAULT-1:0] x_b [2];
  real  sig_off, sig_amp, sig_per;
  longint n;
  int checks = 0, failures = 0, n_tone = 0;

  tb_sine_gen g_x (.clk(clk), .rst_n(rst_n), .offset(sig_off), .amp(sig_amp), .period(sig_per),
                   .q(e_in), .n(n));
  tb_rate_gen g_b (.clk(clk), .rst_n(rst_n), .num(1), .den(2), .q(bias));
  for (genvar k = 0; k < 5; k++) begin : g_c
    tb_rate_gen gc (.clk(clk), .rst_n(rst_n), .num(CNUM[k]), .den(16), .q(coef[k]));
  end

  lattice_odlf dut (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef_a(coef[2:0]), .coef_b(coef[4:3]),
    .bias(bias), .y_lp(y_lp), .y_sum(y_sum), .w_a(w_a), .w_b(w_b), .x_a(x_a), .x_b(x_b),
    .sat_a(sat_a), .sat_b(sat_b)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok, real got, real want);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: got %f (reference %f)", what, got, want);
    end else $display("ok   %s: got %f (reference %f)", what, got, want);
  endtask

  task automatic measure(real f_hz, output real h_db);
    real per, ci [2], cq [2], ph;
    int nper, len, win;
    per = FS / f_hz;
    win = (f_hz > 4.3e3) ? 1200000 : 400000;
    @(negedge clk) sig_per = per;
    repeat (400000) @(posedge clk);
    nper = int'(real'(win) / per) + 1;
    len = int'(real'(nper) * per);
    foreach (ci[i]) begin ci[i] = 0; cq[i] = 0; end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * real'(n) / per;
      ci[0] += (real'(y_lp) - 0.625) * $sin(ph); cq[0] += (real'(y_lp) - 0.625) * $cos(ph);
      ci[1] += (real'(e_in) - 0.75) * $sin(ph);  cq[1] += (real'(e_in) - 0.75) * $cos(ph);
    end
    h_db = 20.0 * $log10(2.0 * $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) /
                         $sqrt(ci[1] * ci[1] + cq[1] * cq[1]));
    n_tone++;
  endtask

  initial begin
    real h;
    sig_off = 0.75; sig_amp = 0.0; sig_per = 19500.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (400000) @(posedge clk);
    @(negedge clk) sig_amp = 0.1;
    for (int i = 0; i < NF; i++) begin
      measure(FREQ[i], h);
      if (FREQ[i] <= 4.25e3)
        check($sformatf("|H| at %0.2f kHz [dB]", FREQ[i] / 1000.0),
              h < HREF[i] + 1.0 && h > HREF[i] - 1.0, h, HREF[i]);
      else
        check($sformatf("|H| at %0.2f kHz [dB]", FREQ[i] / 1000.0),
              h < HREF[i] + 3.0 && h > HREF[i] - 3.0, h, HREF[i]);
      if (FREQ[i] <= 3.0e3)
        check("  mask: pass band loss <= 0.25 dB", h > -0.25 && h < 0.25, h, 0.0);
      else if (FREQ[i] >= 4.0e3 && FREQ[i] <= 4.6e3)
        check("  mask: attenuation >= 14 dB", h < -14.0, h, -14.0);
      else if (FREQ[i] > 4.6e3)
        check("  mask: attenuation >= 32 dB", h < -32.0, h, -32.0);
    end
    checks++; if (n_tone != NF) failures++;
    $display("mechanisms: tones=%0d", n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
