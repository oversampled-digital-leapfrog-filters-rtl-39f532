// tb_allpass_odlf: self-checking test of allpass_odlf at its default sizes (third order branch
// with the benchmark branch-a coefficients 9/16, 1/4, 1, 10-bit counters, one clock per sample
// at 39 MHz).
//  1. DC working point: E = 3/4, RI0 = 1/2. The branch rests at w_1 = E - RI0 = 1/4, so the
//     first RM input is 1024 * (1/4) / (9/16) = 455 and the output rate 1/2 + (E - 2 w_1)/4.
//  2. Tones of amplitude 0.08 at 0.5, 2 and 3.5 kHz: the gain of (E - 2 U1)/E, measured as four
//     times the output amplitude over the input amplitude, must be 1 (allpass), and its phase
//     must match the phase of (R - Z)/(R + Z) computed from the branch's state equations
//     (154, 81 and -110 degrees).
// Mechanisms counted: DC point and tones; a missing one counts as a failure.
module tb_allpass_odlf;
  import odlf_pkg::*;
  localparam int  NB = NBITS_DEFAULT;
  localparam real FS = 39.0e6;
  localparam int unsigned CNUM [3] = '{9, 16, 16};   // coefficient rates in 16ths

  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, bias, y;
  logic [2:0] coef, w, sat;
  logic [NB-1:0] x [3];
  real  sig_off, sig_amp, sig_per;
  longint n;
  int checks = 0, failures = 0, n_dc = 0, n_tone = 0;

  tb_sine_gen g_e (.clk(clk), .rst_n(rst_n), .offset(sig_off), .amp(sig_amp), .period(sig_per),
                   .q(e_in), .n(n));
  tb_rate_gen g_b (.clk(clk), .rst_n(rst_n), .num(1), .den(2), .q(bias));
  for (genvar k = 0; k < 3; k++) begin : g_c
    tb_rate_gen gc (.clk(clk), .rst_n(rst_n), .num(CNUM[k]), .den(16), .q(coef[k]));
  end

  allpass_odlf dut (.clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef), .bias(bias), .y(y),
                    .w(w), .x(x), .sat(sat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(string what, real got, real want, real tol);
    checks++;
    if (got > want + tol || got < want - tol) begin
      failures++;
      $display("FAIL %s: got %f want %f +- %f", what, got, want, tol);
    end else $display("ok   %s: got %f want %f", what, got, want);
  endtask

  task automatic measure_tone(real f_hz, real ph_deg);
    real per, ci [2], cq [2], ph, gain, dph, dc;
    int nper, len;
    per = FS / f_hz;
    dc = 0.5 + (0.75 - 2.0 * 0.25) / 4.0;
    @(negedge clk) sig_per = per;
    repeat (300000) @(posedge clk);
    nper = int'(300000.0 / per) + 1;
    len = int'(real'(nper) * per);
    foreach (ci[i]) begin ci[i] = 0; cq[i] = 0; end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * real'(n) / per;
      ci[0] += (real'(y) - dc) * $sin(ph);      cq[0] += (real'(y) - dc) * $cos(ph);
      ci[1] += (real'(e_in) - 0.75) * $sin(ph); cq[1] += (real'(e_in) - 0.75) * $cos(ph);
    end
    gain = 4.0 * $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) / $sqrt(ci[1] * ci[1] + cq[1] * cq[1]);
    dph = ($atan2(cq[0], ci[0]) - $atan2(cq[1], ci[1])) * 180.0 / 3.14159265358979;
    dph = dph - ph_deg;
    while (dph > 180.0) dph -= 360.0;
    while (dph < -180.0) dph += 360.0;
    check_near($sformatf("allpass gain at %0.1f kHz", f_hz / 1000.0), gain, 1.0, 0.03);
    check_near($sformatf("phase error at %0.1f kHz [deg]", f_hz / 1000.0), dph, 0.0, 3.0);
    n_tone++;
  endtask

  initial begin
    real sx, sy;
    int len;
    sig_off = 0.75; sig_amp = 0.0; sig_per = 19500.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    repeat (400000) @(posedge clk);
    len = 65536; sx = 0; sy = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      sx += real'(x[0]); sy += real'(y);
    end
    check_near("x_1", sx / len, 1024.0 * 0.25 * 16.0 / 9.0, 6.0);
    check_near("output rate", sy / len, 0.5625, 0.006);
    n_dc++;

    @(negedge clk) sig_amp = 0.08;
    measure_tone(500.0, 153.94);
    measure_tone(2000.0, 80.99);
    measure_tone(3500.0, -109.68);

    checks++; if (n_dc == 0 || n_tone == 0) failures++;
    $display("mechanisms: dc=%0d tones=%0d", n_dc, n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
