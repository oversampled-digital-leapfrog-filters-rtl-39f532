// rm_bit_slice: one bit of the rate multiplier (RM).
//
// A divider by two forms one bit of the free-running dither counter, and a three-input carry
// function forms one bit of the adder that adds the dither to the binary input. The counter
// counts down: its carry (borrow) goes on to the next counter bit when the bit rises from 0 to
// 1. The counter carry chain runs in the opposite direction to the adder carry chain, so that
// the counter LSB sits at the adder MSB: the dither is the counter value with its bit weights
// reversed, and slice k adds its own counter bit to input bit x_k. Only the adder carry is
// formed, since only the MSB of the sum is used:
// add_c_out = majority(x_k, counter bit, add_c_in).
module rm_bit_slice (
  input  logic clk,
  input  logic rst_n,
  input  logic x_k,         // input bit of this slice's weight
  input  logic cnt_c_in,    // counter carry from the slice holding the next lower counter bit
  output logic cnt_c_out,   // counter carry to the slice holding the next higher counter bit
  input  logic add_c_in,    // adder carry from the next lower weight
  output logic add_c_out    // adder carry to the next higher weight
);
  logic d_k;   // dither bit: this slice's counter bit
  logic qn;

  div2 u_div2 (.clk(clk), .rst_n(rst_n), .t(cnt_c_in), .q(d_k), .qn(qn));

  assign cnt_c_out = cnt_c_in & qn;
  assign add_c_out = (x_k & d_k) | (x_k & add_c_in) | (d_k & add_c_in);
endmodule
