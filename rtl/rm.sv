// rm: rate multiplier, the coefficient multiplier and one-bit quantizer of the ODLF.
//
// Output rate = c * x / 2^W: the binary input x is quantized to one bit by adding a dither
// pattern and keeping the MSB of the sum (rounding with dither), and the result is ANDed with
// the coefficient pulse rate c. The dither is a W-bit down-counter stepped by each pulse of c,
// read with its bit weights reversed, so its MSB changes with every pulse. With constant inputs
// the output repeats every 2^W coefficient pulses and holds exactly x ones in that period.
//
// Structure: W bit slices (counter bit and adder carry) and a control slice at the MSB end.
// Timing: y is combinational from the registered counter, x and c within one sample; the
// counter advances at the clock edge after each coefficient pulse.
module rm #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,    // binary input (UDC value)
  input  logic         c,    // coefficient pulse rate
  output logic         y     // product pulse rate
);
  logic [W:0] cnt_c;   // cnt_c[k]: counter carry into slice k, entering at slice W-1
  logic [W:0] add_c;   // add_c[k]: adder carry into weight k
  logic         cnt_c_top;

  assign add_c[0] = 1'b0;  // the adder's LSB carry input is tied to zero

  rm_control_slice u_ctrl (.c(c), .add_c_out(add_c[W]), .cnt_c_in(cnt_c_top), .y(y));
  assign cnt_c[W] = cnt_c_top;

  for (genvar k = 0; k < W; k++) begin : g_slice
    rm_bit_slice u_slice (
      .clk(clk), .rst_n(rst_n), .x_k(x[k]),
      .cnt_c_in(cnt_c[k+1]), .cnt_c_out(cnt_c[k]),
      .add_c_in(add_c[k]), .add_c_out(add_c[k+1])
    );
  end

  // The borrow out of the counter MSB is not needed: the counter is free running.
  logic unused_cnt_borrow;
  assign unused_cnt_borrow = cnt_c[0];
endmodule
