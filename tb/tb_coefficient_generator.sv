// tb_coefficient_generator: self-checking test of coefficient_generator at its defaults
// (10-bit rate multipliers, reference 998/1024 of the clock, coefficients 576, 1024, 1024,
// 1024, 576 in 1024ths of the reference).
//  1. ref_out holds exactly 998 ones in every window of 1024 clocks (checked per window).
//  2. Over 1024 * 1024 clocks, coefficient k holds exactly 998 * COEF_X[k] ones (COEF_X = 1024
//     means the reference itself), and it is never 1 while ref_out is 0.
module tb_coefficient_generator;
  import odlf_pkg::*;
  localparam int unsigned N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_out;
  logic [N-1:0] coef;
  int checks = 0, failures = 0;

  coefficient_generator dut (.clk(clk), .rst_n(rst_n), .ref_out(ref_out), .coef(coef));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_win, ref_total, outside;
    int ones [N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ref_win = 0; ref_total = 0; outside = 0;
    foreach (ones[k]) ones[k] = 0;
    for (int i = 0; i < 1024 * 1024; i++) begin
      ref_win += int'(ref_out);
      for (int k = 0; k < N; k++) begin
        ones[k] += int'(coef[k]);
        if (coef[k] && !ref_out) outside++;
      end
      if (i % 1024 == 1023) begin
        checks++;
        if (ref_win != REF_RATE_DEFAULT) begin
          failures++;
          $display("FAIL ref window %0d: %0d ones, want %0d", i / 1024, ref_win,
                   REF_RATE_DEFAULT);
        end
        ref_total += ref_win;
        ref_win = 0;
      end
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (ones[k] != int'(REF_RATE_DEFAULT * COEF_RATES_DEFAULT[k])) begin
        failures++;
        $display("FAIL coef[%0d]: %0d ones, want %0d", k, ones[k],
                 REF_RATE_DEFAULT * COEF_RATES_DEFAULT[k]);
      end else $display("ok   coef[%0d]: %0d ones", k, ones[k]);
    end
    checks++;
    if (outside != 0) begin
      failures++;
      $display("FAIL %0d coefficient pulses outside reference pulses", outside);
    end
    $display("reference: %0d ones in %0d clocks", ref_total, 1024 * 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
