// tb_ladder_odlf: DC and frequency-response check of a fifth order ladder ODLF (10-bit, one
// clock per sample at 39 MHz). Coefficient rates are those
// of an equally terminated fifth order Butterworth ladder (elements 0.618, 1.618, 2, 1.618,
// 0.618, inverses scaled to a maximum of 1 and rounded to sixteenths: 16, 6, 5, 6, 16 / 16).
// With every integrator input at zero all states equal E/2, so for E = 1/2 each state rate is
// 1/4, the output rate is 1/4 and RM input k is (1/4) / c_k of full scale.
// Then tones of amplitude 0.05 at 2, 4 and 6 kHz: 2 |y| / |E| against the response computed
// from the same state equations with integrator gain fs/1024 (-0.004, -4.84, -20.80 dB).
// The amplitude is small because the third counter rests at 0.8 of full scale and swings about
// twice the input amplitude near the band edge.
module tb_ladder_odlf;
  import odlf_pkg::*;
  localparam int NB = 10;
  localparam int SETTLE = 600000;
  localparam int WIN = 65536;
  localparam real FS = 39.0e6;
  localparam int unsigned CNUM [5] = '{16, 6, 5, 6, 16};
  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, y;
  logic [4:0] coef, w, sat;
  logic [NB-1:0] x [5];
  int checks = 0, failures = 0, n_tone = 0;
  real sig_amp = 0.0, sig_per = 19500.0;
  longint n;

  tb_sine_gen g_e (.clk(clk), .rst_n(rst_n), .offset(0.5), .amp(sig_amp), .period(sig_per),
                   .q(e_in), .n(n));
  for (genvar k = 0; k < 5; k++) begin : g_c
    tb_rate_gen g (.clk(clk), .rst_n(rst_n), .num(CNUM[k]), .den(16), .q(coef[k]));
  end

  ladder_odlf dut (.clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef), .y(y), .w(w), .x(x), .sat(sat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETTLE + WIN + 3000000) @(posedge clk);
    failures++;
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
    repeat (300000) @(posedge clk);
    nper = int'(400000.0 / per) + 1;
    len = int'(real'(nper) * per);
    foreach (ci[i]) begin ci[i] = 0; cq[i] = 0; end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * real'(n) / per;
      ci[0] += (real'(y) - 0.25) * $sin(ph);   cq[0] += (real'(y) - 0.25) * $cos(ph);
      ci[1] += (real'(e_in) - 0.5) * $sin(ph); cq[1] += (real'(e_in) - 0.5) * $cos(ph);
    end
    check_near($sformatf("|H| at %0.1f kHz [dB]", f_hz / 1000.0),
               20.0 * $log10(2.0 * $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) /
                             $sqrt(ci[1] * ci[1] + cq[1] * cq[1])), h_db, tol_db);
    n_tone++;
  endtask

  initial begin
    real sx [5];
    real sy;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (SETTLE) @(posedge clk);
    foreach (sx[i]) sx[i] = 0;
    sy = 0;
    for (int i = 0; i < WIN; i++) begin
      @(negedge clk);
      foreach (sx[k]) sx[k] += real'(x[k]);
      sy += real'(y);
    end
    foreach (sx[k]) check_near($sformatf("x%0d", k + 1), sx[k] / WIN, 1024.0 * 0.25 * 16.0 / real'(CNUM[k]), 6.0);
    check_near("y rate", sy / WIN, 0.25, 0.006);
    @(negedge clk) sig_amp = 0.05;
    measure_tone(2000.0, -0.004, 0.5);
    measure_tone(4000.0, -4.839, 1.0);
    measure_tone(6000.0, -20.799, 2.0);
    checks++; if (n_tone != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
