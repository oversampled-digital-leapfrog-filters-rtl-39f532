// tb_odlf_branch: runs a second order lattice branch (branch b of the benchmark filter:
// coefficient rates 1 and 9/16 with one extra LSB on the first counter, i.e. coefficients 1/2
// and 9/16) with input E = 3/4 and bias RI0 = 1/2. The DC working point follows from setting
// every integrator input to zero: w_b1 = RI0 = 1/2 and w_b2 = E - w_b1 = 1/4, so the RM inputs
// settle to x_b1 = 1/2 / 1 = 512 and x_b2 = (1/4) / (9/16) = 455 (of 1024). Also checks that the
// states' pulse rates match 1/2 and 1/4.
// Then tones of amplitude 0.05 at 1, 2 and 3.5 kHz (one clock per sample at 39 MHz): the first
// state's response W1/E must match the branch's state equations with integrator gain fs/1024
// (magnitude 0.309, 0.691, 0.984; phase 72.0, 46.3, -10.2 degrees). 1 - 2 W1/E is then an
// allpass, the property the lattice filter is built on.
module tb_odlf_branch;
  import odlf_pkg::*;
  localparam int NB = 10;
  localparam int SETTLE = 400000;
  localparam int WIN = 65536;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, bias;
  logic [1:0] coef, w, sat;
  logic [NB-1:0] x [2];
  localparam real FS = 39.0e6;
  int checks = 0, failures = 0, n_tone = 0;
  real sig_amp = 0.0, sig_per = 19500.0;
  longint n;

  tb_sine_gen g_e (.clk(clk), .rst_n(rst_n), .offset(0.75), .amp(sig_amp), .period(sig_per),
                   .q(e_in), .n(n));
  tb_rate_gen g_b  (.clk(clk), .rst_n(rst_n), .num(1),  .den(2),  .q(bias));
  tb_rate_gen g_c0 (.clk(clk), .rst_n(rst_n), .num(1),  .den(1),  .q(coef[0]));
  tb_rate_gen g_c1 (.clk(clk), .rst_n(rst_n), .num(9),  .den(16), .q(coef[1]));

  odlf_branch #(.NBITS(NB), .ORDER(2), .EXTRA(EXTRA_B_DEFAULT), .LOAD(LOAD_BIAS)) dut (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef), .bias(bias), .w(w), .x(x), .sat(sat)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETTLE + WIN + 2500000) @(posedge clk);
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

  task automatic measure_tone(real f_hz, real mag, real ph_deg);
    real per, ci [2], cq [2], ph, dph;
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
      ci[0] += (real'(w[0]) - 0.5) * $sin(ph);  cq[0] += (real'(w[0]) - 0.5) * $cos(ph);
      ci[1] += (real'(e_in) - 0.75) * $sin(ph); cq[1] += (real'(e_in) - 0.75) * $cos(ph);
    end
    dph = ($atan2(cq[0], ci[0]) - $atan2(cq[1], ci[1])) * 180.0 / 3.14159265358979 - ph_deg;
    while (dph > 180.0) dph -= 360.0;
    while (dph < -180.0) dph += 360.0;
    check_near($sformatf("|W1/E| at %0.1f kHz", f_hz / 1000.0),
               $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) / $sqrt(ci[1] * ci[1] + cq[1] * cq[1]),
               mag, 0.02);
    check_near($sformatf("phase error at %0.1f kHz [deg]", f_hz / 1000.0), dph, 0.0, 3.0);
    n_tone++;
  endtask

  initial begin
    real sx0, sx1, sw0, sw1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (SETTLE) @(posedge clk);
    sx0 = 0; sx1 = 0; sw0 = 0; sw1 = 0;
    for (int i = 0; i < WIN; i++) begin
      @(negedge clk);
      sx0 += real'(x[0]); sx1 += real'(x[1]);
      sw0 += real'(w[0]); sw1 += real'(w[1]);
    end
    check_near("x_b1", sx0 / WIN, 512.0, 6.0);
    check_near("x_b2", sx1 / WIN, 455.1, 6.0);
    check_near("w_b1 rate", sw0 / WIN, 0.5, 0.006);
    check_near("w_b2 rate", sw1 / WIN, 0.25, 0.006);
    @(negedge clk) sig_amp = 0.05;
    measure_tone(1000.0, 0.3088, 72.01);
    measure_tone(2000.0, 0.6914, 46.26);
    measure_tone(3500.0, 0.9841, -10.24);
    checks++; if (n_tone != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
