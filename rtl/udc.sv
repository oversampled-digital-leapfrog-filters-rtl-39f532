// udc: up-down counter, the integrator of the ODLF.
//
// The counter value y, read as a fraction y / 2^W in [0,1), integrates the difference of two
// one-bit pulse-rate inputs: each sample in which cnt_up alone is 1 adds one LSB, each sample in
// which cnt_dn alone is 1 removes one LSB. Its s-domain gain is f_s / 2^W. At the ends of the
// range the counter saturates (holds) instead of wrapping.
//
// Structure: W identical bit slices (divider by two, ripple carry multiplexer, underflow and
// overflow detectors) and one control slice at the LSB end. The document's counter is an
// asynchronous ripple counter clocked by the carry pulses; here every slice toggles on the
// common sample clock when its carry-in is high, and the carry ripples combinationally within
// the sample period. The new value is visible one clock after the command (one sample).
// DN2 = 1 gives the decrement a weight of two LSBs (see udc_control_slice).
module udc #(
  parameter int unsigned W   = 10,
  parameter bit          DN2 = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cnt_up,   // increment pulse rate (+ input)
  input  logic         cnt_dn,   // decrement pulse rate (- input)
  output logic [W-1:0] y,        // counter value
  output logic         sat       // a count was inhibited by saturation in this sample
);
  logic [W:0] carry;     // carry[k]: carry pulse into slice k
  logic [W:0] zero_c;    // zero_c[k]: bits k..W-1 all zero
  logic [W:0] ones_c;    // ones_c[k]: bits k..W-1 all one
  logic       inc, c_in0, c_in1;

  assign zero_c[W] = 1'b1;
  assign ones_c[W] = 1'b1;

  udc_control_slice #(.DN2(DN2)) u_ctrl (
    .cnt_up(cnt_up), .cnt_dn(cnt_dn),
    .ovf(ones_c[0]), .unf(zero_c[0]), .unf_hi(zero_c[1]),
    .inc(inc), .c_in0(c_in0), .c_in1(c_in1), .sat(sat)
  );

  for (genvar k = 0; k < W; k++) begin : g_slice
    logic cin_k;
    if (k == 0) begin : g_lsb
      assign cin_k = c_in0;
    end else if (k == 1) begin : g_bit1
      assign cin_k = carry[1] | c_in1;
    end else begin : g_upper
      assign cin_k = carry[k];
    end
    udc_bit_slice u_slice (
      .clk(clk), .rst_n(rst_n), .inc(inc),
      .c_in(cin_k), .c_out(carry[k+1]),
      .zero_in(zero_c[k+1]), .zero_out(zero_c[k]),
      .ones_in(ones_c[k+1]), .ones_out(ones_c[k]),
      .q(y[k])
    );
  end
  assign carry[0] = c_in0;

  // The carry out of the MSB slice is never needed: saturation is detected beforehand.
  logic unused_msb_carry;
  assign unused_msb_carry = carry[W];

endmodule
