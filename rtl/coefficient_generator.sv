// coefficient_generator: derives the filter's coefficient pulse rates from the system clock.
//
// The integrator gain of the filter is set by the rate that stands for a coefficient of 1
// (about 39 MHz for the 10-bit benchmark). With a standard 40 MHz clock that rate is made by a
// rate multiplier whose coefficient input is always 1 and whose binary input is REF_X:
//   ref_out rate = REF_X / 2^W of the clock   (998/1024 * 40 MHz = 38.98 MHz by default).
// Every coefficient k is then a second rate multiplier clocked by that reference:
//   coef[k] rate = COEF_X[k] / 2^W * ref_out rate,
// or the reference itself where COEF_X[k] = 2^W. Every coefficient pulse is also a
// reference pulse, so all coefficients share one time base. With constant settings each output
// is periodic and exact: ref_out holds REF_X ones in every 2^W clocks, and coef[k] holds
// COEF_X[k] ones in every 2^W reference pulses.
//
// That a rate multiplier on a quartz clock can provide the coefficient rates is the document's
// suggestion; the two-level arrangement and the default numbers (998/1024, the scaled benchmark
// rates 9/16, 1, 1, 1, 9/16) are this design's choice.
//
// Interface and timing: outputs are combinational from registered dither counters and are valid
// in the same clock as the filter samples them; they are synchronous to clk.
module coefficient_generator
  import odlf_pkg::*;
#(
  parameter int unsigned W      = NBITS_DEFAULT,
  parameter int unsigned N      = ORDER_A + ORDER_B,
  parameter int unsigned REF_X  = REF_RATE_DEFAULT,
  parameter rate_array_t COEF_X = COEF_RATES_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ref_out,   // rate standing for a coefficient of 1
  output logic [N-1:0] coef       // coefficient pulse rates
);
  localparam int unsigned FULL = 1 << W;

  initial assert (N >= 1 && N <= MAX_ORDER) else $error("N out of range");
  initial assert (REF_X <= FULL) else $error("REF_X above 2^W");

  if (REF_X >= FULL) begin : g_ref_full
    assign ref_out = 1'b1;
  end else begin : g_ref_rm
    localparam logic [W-1:0] XR = W'(REF_X);
    rm #(.W(W)) u_ref (.clk(clk), .rst_n(rst_n), .x(XR), .c(1'b1), .y(ref_out));
  end

  for (genvar k = 0; k < N; k++) begin : g_coef
    if (COEF_X[k] >= FULL) begin : g_full
      assign coef[k] = ref_out;
    end else begin : g_rm
      localparam logic [W-1:0] XK = W'(COEF_X[k]);
      rm #(.W(W)) u_rm (.clk(clk), .rst_n(rst_n), .x(XK), .c(ref_out), .y(coef[k]));
    end
  end
endmodule
