// tb_chip_config: the lattice filter in the configuration of the fabricated test chip:
// 11-bit operators and no extra counter LSBs, so the coefficient rates are the benchmark
// coefficients themselves (9/16, 1/4, 1, 1/2, 9/16) and the clock is 78 MHz for the same
// characteristic frequency (fs = 2 pi f0 2^11).
//
// Without scaling, the a2 pair has RM coefficient 1/4 and its state cannot exceed 1/4, but the
// working point puts RI0 on that state; so the usual bias RI0 = 1/2 cannot be held. This test
// uses RI0 = 1/8 with the matching offset E = 9/16. Then the states rest at
//   w_a1 = w_a3 = w_b2 = E - RI0 = 7/16 and w_a2 = w_b1 = RI0 = 1/8,
// i.e. RM inputs (of 2048) 1593, 1024, 896, 512, 1593, and y_lp = 1/2 + (w_b1 - w_a1)/2 = 11/32.
//  1. DC: all five RM inputs and the output rate.
//  2. Tones of amplitude 0.05 at 2 and 3.5 kHz against the analytic response (-0.04, -2.95 dB).
module tb_chip_config;
  import odlf_pkg::*;
  localparam int  NB = 11;
  localparam real FS = 78.0e6;
  localparam int unsigned CNUM [5] = '{9, 4, 16, 8, 9};   // coefficients in 16ths

  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, bias, y_lp, y_sum;
  logic [4:0] coef;
  logic [2:0] w_a, sat_a;
  logic [1:0] w_b, sat_b;
  logic [NB-1:0] x_a [3];
  logic [NB-1:0] x_b [2];
  real  sig_off, sig_amp, sig_per;
  longint n;
  int checks = 0, failures = 0, n_dc = 0, n_tone = 0;

  tb_sine_gen g_x (.clk(clk), .rst_n(rst_n), .offset(sig_off), .amp(sig_amp), .period(sig_per),
                   .q(e_in), .n(n));
  tb_rate_gen g_b (.clk(clk), .rst_n(rst_n), .num(1), .den(8), .q(bias));
  for (genvar k = 0; k < 5; k++) begin : g_c
    tb_rate_gen gc (.clk(clk), .rst_n(rst_n), .num(CNUM[k]), .den(16), .q(coef[k]));
  end

  lattice_odlf #(.NBITS(NB), .EXTRA_A(EXTRA_NONE), .EXTRA_B(EXTRA_NONE)) dut (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef_a(coef[2:0]), .coef_b(coef[4:3]),
    .bias(bias), .y_lp(y_lp), .y_sum(y_sum), .w_a(w_a), .w_b(w_b), .x_a(x_a), .x_b(x_b),
    .sat_a(sat_a), .sat_b(sat_b)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
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

  task automatic measure_tone(real f_hz, real h_db, real tol_db);
    real per, ci [2], cq [2], ph;
    int nper, len;
    per = FS / f_hz;
    @(negedge clk) sig_per = per;
    repeat (800000) @(posedge clk);
    nper = int'(800000.0 / per) + 1;
    len = int'(real'(nper) * per);
    foreach (ci[i]) begin ci[i] = 0; cq[i] = 0; end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * real'(n) / per;
      ci[0] += (real'(y_lp) - 11.0 / 32.0) * $sin(ph);
      cq[0] += (real'(y_lp) - 11.0 / 32.0) * $cos(ph);
      ci[1] += (real'(e_in) - 9.0 / 16.0) * $sin(ph);
      cq[1] += (real'(e_in) - 9.0 / 16.0) * $cos(ph);
    end
    check_near($sformatf("|H| at %0.1f kHz [dB]", f_hz / 1000.0),
               20.0 * $log10(2.0 * $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) /
                             $sqrt(ci[1] * ci[1] + cq[1] * cq[1])), h_db, tol_db);
    n_tone++;
  endtask

  initial begin
    real sx [5], sy;
    int len;
    sig_off = 9.0 / 16.0; sig_amp = 0.0; sig_per = 39000.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (1200000) @(posedge clk);
    len = 131072;
    foreach (sx[i]) sx[i] = 0;
    sy = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) sx[k] += real'(x_a[k]);
      for (int k = 0; k < 2; k++) sx[3 + k] += real'(x_b[k]);
      sy += real'(y_lp);
    end
    check_near("x_a1", sx[0] / len, 2048.0 * 7.0 / 9.0, 10.0);
    check_near("x_a2", sx[1] / len, 1024.0, 10.0);
    check_near("x_a3", sx[2] / len, 896.0, 10.0);
    check_near("x_b1", sx[3] / len, 512.0, 10.0);
    check_near("x_b2", sx[4] / len, 2048.0 * 7.0 / 9.0, 10.0);
    check_near("y_lp rate", sy / len, 11.0 / 32.0, 0.004);
    n_dc++;

    @(negedge clk) sig_amp = 0.05;
    measure_tone(2000.0, -0.0440, 0.5);
    measure_tone(3500.0, -2.9505, 1.0);

    checks++; if (n_dc == 0 || n_tone == 0) failures++;
    $display("mechanisms: dc=%0d tones=%0d", n_dc, n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
