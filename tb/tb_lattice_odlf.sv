// tb_lattice_odlf: DC working point of the fifth order lattice ODLF at its default sizes
// (10-bit RMs, extra counter LSBs 0,2,0 / 1,0, coefficient rates 9/16, 1, 1 / 1, 9/16), zero
// signal: input E = U0 = 3/4, bias RI0 = 1/2. Setting all integrator inputs to zero gives
// w_a1 = 1/4, w_a2 = 1/2, w_a3 = 1/4, w_b1 = 1/2, w_b2 = 1/4, hence RM inputs (of 1024)
// 455, 512, 256, 512, 455, and output rates y_lp = 1/2 + (w_b1 - w_a1)/2 = 5/8 and
// y_sum = (w_a1 + w_b1)/2 = 3/8 (complementary output E - 2 y_sum = 0).
module tb_lattice_odlf;
  import odlf_pkg::*;
  localparam int NB = 10;
  localparam int SETTLE = 600000;
  localparam int WIN = 65536;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e_in, bias, y_lp, y_sum;
  logic [2:0] coef_a, w_a, sat_a;
  logic [1:0] coef_b, w_b, sat_b;
  logic [NB-1:0] x_a [3];
  logic [NB-1:0] x_b [2];
  int checks = 0, failures = 0;

  tb_rate_gen g_e  (.clk(clk), .rst_n(rst_n), .num(3), .den(4),  .q(e_in));
  tb_rate_gen g_b  (.clk(clk), .rst_n(rst_n), .num(1), .den(2),  .q(bias));
  tb_rate_gen g_a1 (.clk(clk), .rst_n(rst_n), .num(9), .den(16), .q(coef_a[0]));
  tb_rate_gen g_a2 (.clk(clk), .rst_n(rst_n), .num(1), .den(1),  .q(coef_a[1]));
  tb_rate_gen g_a3 (.clk(clk), .rst_n(rst_n), .num(1), .den(1),  .q(coef_a[2]));
  tb_rate_gen g_b1 (.clk(clk), .rst_n(rst_n), .num(1), .den(1),  .q(coef_b[0]));
  tb_rate_gen g_b2 (.clk(clk), .rst_n(rst_n), .num(9), .den(16), .q(coef_b[1]));

  lattice_odlf dut (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef_a(coef_a), .coef_b(coef_b), .bias(bias),
    .y_lp(y_lp), .y_sum(y_sum), .w_a(w_a), .w_b(w_b), .x_a(x_a), .x_b(x_b),
    .sat_a(sat_a), .sat_b(sat_b)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETTLE + WIN + 1000) @(posedge clk);
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

  initial begin
    real sx [5];
    real slp, ssum;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (SETTLE) @(posedge clk);
    foreach (sx[i]) sx[i] = 0;
    slp = 0; ssum = 0;
    for (int i = 0; i < WIN; i++) begin
      @(negedge clk);
      sx[0] += real'(x_a[0]); sx[1] += real'(x_a[1]); sx[2] += real'(x_a[2]);
      sx[3] += real'(x_b[0]); sx[4] += real'(x_b[1]);
      slp += real'(y_lp); ssum += real'(y_sum);
    end
    check_near("x_a1", sx[0] / WIN, 1024.0 * 4.0 / 9.0, 6.0);
    check_near("x_a2", sx[1] / WIN, 512.0, 6.0);
    check_near("x_a3", sx[2] / WIN, 256.0, 6.0);
    check_near("x_b1", sx[3] / WIN, 512.0, 6.0);
    check_near("x_b2", sx[4] / WIN, 1024.0 * 4.0 / 9.0, 6.0);
    check_near("y_lp rate", slp / WIN, 0.625, 0.006);
    check_near("y_sum rate", ssum / WIN, 0.375, 0.006);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
