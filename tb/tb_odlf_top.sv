// tb_odlf_top: end-to-end test of odlf_top at its default sizes (10-bit operators, one clock
// per sample, so a 39 MHz clock maps tone frequencies to periods of 39e6/f clocks).
//  1. DC working point, zero signal: lattice input U0 = 3/4, RI0 = 1/2; all five RM inputs
//     and both output rates against the values that make every integrator input zero.
//     Ladder at E = 1/2: all states 1/4.
//  2. Frequency response of the lattice filter with input amplitude 0.1 at 2, 3.5 and 4 kHz
//     against the analytic elliptic response (-0.04, -2.95, -15.91 dB), and the complementary
//     output at 4 kHz against sqrt(1 - |H|^2) (doubly complementary pair).
//     The allpass filter shares the lattice's input, branch-a coefficients and bias: DC rate
//     9/16 and gain 1 at each tone. The coefficient generator's outputs are checked against
//     998/1024 of the clock and that rate times 9/16, 1, 1, 1, 9/16.
//  3. Counter saturation: with the bias removed the last counter of branch a runs into
//     overflow; with a zero input the first counter of branch a runs into underflow.
// Every mechanism is counted and a mechanism that never happened counts as a failure.
module tb_odlf_top;
  import odlf_pkg::*;
  localparam int NB = NBITS_DEFAULT;
  localparam real FS = 39.0e6;
  localparam int unsigned CNUM_LAT [5] = '{9, 16, 16, 16, 9};     // a1,a2,a3,b1,b2 in 16ths
  localparam int unsigned CNUM_LAD [5] = '{16, 6, 5, 6, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_in, ri0, lp_out, sum_out, lad_x_in, lad_out;
  logic ri0_gen, ri0_en;
  logic [4:0] coef_in, sat_lat, lad_coef_in, sat_lad;
  logic [NB-1:0] x_lat [5];
  logic [NB-1:0] x_lad [5];
  logic ap_out, cg_ref;
  logic [4:0] cg_coef;
  logic [2:0] sat_ap;
  logic [NB-1:0] x_ap [3];
  real  sig_off, sig_amp, sig_per;
  longint n;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_dc = 0, n_tone = 0, n_comp = 0, n_ap = 0, n_cg = 0;

  tb_sine_gen g_x (.clk(clk), .rst_n(rst_n), .offset(sig_off), .amp(sig_amp), .period(sig_per),
                   .q(x_in), .n(n));
  tb_rate_gen g_ri0 (.clk(clk), .rst_n(rst_n), .num(1), .den(2), .q(ri0_gen));
  assign ri0 = ri0_gen & ri0_en;
  for (genvar k = 0; k < 5; k++) begin : g_c
    tb_rate_gen gl (.clk(clk), .rst_n(rst_n), .num(CNUM_LAT[k]), .den(16), .q(coef_in[k]));
    tb_rate_gen gd (.clk(clk), .rst_n(rst_n), .num(CNUM_LAD[k]), .den(16), .q(lad_coef_in[k]));
  end
  tb_rate_gen g_lx (.clk(clk), .rst_n(rst_n), .num(1), .den(2), .q(lad_x_in));

  odlf_top dut (
    .clk(clk), .rst_n(rst_n),
    .x_in(x_in), .coef_in(coef_in), .ri0(ri0), .lp_out(lp_out), .sum_out(sum_out),
    .x_lat(x_lat), .sat_lat(sat_lat),
    .lad_x_in(lad_x_in), .lad_coef_in(lad_coef_in), .lad_out(lad_out), .x_lad(x_lad),
    .sat_lad(sat_lad),
    .ap_x_in(x_in), .ap_coef_in(coef_in[2:0]), .ap_ri0(ri0), .ap_out(ap_out), .x_ap(x_ap),
    .sat_ap(sat_ap), .cg_ref(cg_ref), .cg_coef(cg_coef)
  );

  always #5 clk = ~clk;

  // saturation events seen at the counters' ends of range
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 5; k++) begin
      if (sat_lat[k] && x_lat[k] == '1) n_ovf++;
      if (sat_lat[k] && x_lat[k] == '0) n_unf++;
    end
    for (int k = 0; k < 3; k++) begin
      if (sat_ap[k] && x_ap[k] == '1) n_ovf++;
      if (sat_ap[k] && x_ap[k] == '0) n_unf++;
    end
  end

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

  // Correlate lp_out, sum_out and x_in with the tone over a whole number of periods.
  task automatic measure_tone(real f_hz, real h_db, real tol_db, bit check_comp);
    real per, ci [4], cq [4], ph, amp_lp, h_meas_db, hc_re, hc_im, hc, h_lin;
    int nper, len;
    per = FS / f_hz;
    @(negedge clk) begin sig_per = per; end
    repeat (400000) @(posedge clk);
    nper = int'(400000.0 / per) + 1;
    len = int'(real'(nper) * per);
    foreach (ci[i]) begin ci[i] = 0; cq[i] = 0; end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * real'(n) / per;
      ci[0] += (real'(lp_out) - 0.625) * $sin(ph);  cq[0] += (real'(lp_out) - 0.625) * $cos(ph);
      ci[1] += (real'(sum_out) - 0.375) * $sin(ph); cq[1] += (real'(sum_out) - 0.375) * $cos(ph);
      ci[2] += (real'(x_in) - 0.75) * $sin(ph);     cq[2] += (real'(x_in) - 0.75) * $cos(ph);
      ci[3] += (real'(ap_out) - 0.5625) * $sin(ph); cq[3] += (real'(ap_out) - 0.5625) * $cos(ph);
    end
    // lp_out carries 1/2 + U2 and H = 2 U2 / E, so |H| = 2 |lp| / |x|
    amp_lp = $sqrt(ci[0] * ci[0] + cq[0] * cq[0]);
    h_lin = 2.0 * amp_lp / $sqrt(ci[2] * ci[2] + cq[2] * cq[2]);
    h_meas_db = 20.0 * $log10(h_lin);
    check_near($sformatf("|H| at %0.1f kHz [dB]", f_hz / 1000.0), h_meas_db, h_db, tol_db);
    n_tone++;
    // allpass output 1/2 + (E - 2 U1)/4: gain 1 at every frequency
    check_near($sformatf("allpass gain at %0.1f kHz", f_hz / 1000.0),
               4.0 * $sqrt(ci[3] * ci[3] + cq[3] * cq[3]) / $sqrt(ci[2] * ci[2] + cq[2] * cq[2]),
               1.0, 0.03);
    n_ap++;
    if (check_comp) begin
      // complementary output E - 2 sum_out, relative to the input
      hc_re = ci[2] - 2.0 * ci[1];
      hc_im = cq[2] - 2.0 * cq[1];
      hc = $sqrt(hc_re * hc_re + hc_im * hc_im) / $sqrt(ci[2] * ci[2] + cq[2] * cq[2]);
      check_near($sformatf("|Hc| at %0.1f kHz", f_hz / 1000.0), hc,
                 $sqrt(1.0 - (10.0 ** (h_db / 10.0))), 0.05);
      n_comp++;
    end
  endtask

  initial begin
    real sx [5], sl [5];
    real slp, ssum, slad, sap, scg [6];
    int len;
    sig_off = 0.75; sig_amp = 0.0; sig_per = 19500.0; ri0_en = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. DC working point
    repeat (600000) @(posedge clk);
    len = 65536;
    foreach (sx[i]) begin sx[i] = 0; sl[i] = 0; end
    slp = 0; ssum = 0; slad = 0; sap = 0;
    foreach (scg[i]) scg[i] = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      foreach (sx[k]) begin sx[k] += real'(x_lat[k]); sl[k] += real'(x_lad[k]); end
      slp += real'(lp_out); ssum += real'(sum_out); slad += real'(lad_out);
      sap += real'(ap_out);
      scg[5] += real'(cg_ref);
      for (int k = 0; k < 5; k++) scg[k] += real'(cg_coef[k]);
    end
    check_near("x_a1", sx[0] / len, 1024.0 * 4.0 / 9.0, 6.0);
    check_near("x_a2", sx[1] / len, 512.0, 6.0);
    check_near("x_a3", sx[2] / len, 256.0, 6.0);
    check_near("x_b1", sx[3] / len, 512.0, 6.0);
    check_near("x_b2", sx[4] / len, 1024.0 * 4.0 / 9.0, 6.0);
    check_near("lp_out rate", slp / len, 0.625, 0.006);
    check_near("sum_out rate", ssum / len, 0.375, 0.006);
    foreach (sl[k]) check_near($sformatf("ladder x%0d", k + 1), sl[k] / len,
                               1024.0 * 0.25 * 16.0 / real'(CNUM_LAD[k]), 6.0);
    check_near("ladder out rate", slad / len, 0.25, 0.006);
    check_near("allpass out rate", sap / len, 0.5625, 0.006);
    // coefficient generator: 998/1024 reference and the scaled benchmark rates times it
    check_near("generator reference rate", scg[5] / len, 998.0 / 1024.0, 0.0001);
    foreach (CNUM_LAT[k])
      check_near($sformatf("generator coefficient %0d", k), scg[k] / len,
                 998.0 / 1024.0 * real'(CNUM_LAT[k]) / 16.0, 0.001);
    n_cg++;
    n_dc++;

    // 2. frequency response (reference values: analytic prototype response). The amplitude
    // is kept at 0.1: near the band edge the third counter of branch a swings about 2.5x
    // the input amplitude around its working point of 1/4, so 0.2 would clip it at zero.
    @(negedge clk) sig_amp = 0.1;
    measure_tone(2000.0, -0.0440, 0.5, 1'b0);
    measure_tone(3500.0, -2.9505, 1.0, 1'b0);
    measure_tone(4000.0, -15.9088, 2.5, 1'b1);

    // 3. saturation: remove the bias (overflow), then a zero input (underflow)
    @(negedge clk) begin sig_amp = 0.0; ri0_en = 1'b0; end
    repeat (300000) @(posedge clk);
    @(negedge clk) begin ri0_en = 1'b1; sig_off = 0.0; end
    repeat (300000) @(posedge clk);

    $display("mechanisms: dc=%0d tones=%0d complementary=%0d allpass=%0d overflow=%0d underflow=%0d",
             n_dc, n_tone, n_comp, n_ap, n_ovf, n_unf);
    checks++; if (n_ovf == 0) begin failures++; $display("FAIL no overflow saturation"); end
    checks++; if (n_unf == 0) begin failures++; $display("FAIL no underflow saturation"); end
    checks++; if (n_dc == 0 || n_tone == 0 || n_comp == 0 || n_ap == 0 || n_cg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
