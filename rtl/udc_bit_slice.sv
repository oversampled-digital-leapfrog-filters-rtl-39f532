// udc_bit_slice: one bit of the up-down counter (UDC).
//
// Three sub-cells: a divider by two holding the bit, the multiplexed ripple carry logic and the
// underflow/overflow detection. The carry pulse c_in toggles the bit. In count-up mode
// (inc = 1) the carry goes on to the next slice when the bit falls from 1 to 0, in count-down
// mode when it rises from 0 to 1, so c_out = c_in & (inc ? q : ~q) before the toggle. The
// all-zero and all-one detectors are chains running from the MSB slice towards the control
// slice at the LSB end: zero_out = zero_in & ~q, ones_out = ones_in & q (the slice's NOR and
// NAND terms). The ripple carry is combinational within one clock period; the bit changes on
// the clock edge.
module udc_bit_slice (
  input  logic clk,
  input  logic rst_n,
  input  logic inc,       // 1: count up, 0: count down (common to all slices)
  input  logic c_in,      // carry pulse from the lower slice or the control slice
  output logic c_out,     // carry pulse to the next higher slice
  input  logic zero_in,   // all higher bits are 0
  output logic zero_out,  // this and all higher bits are 0
  input  logic ones_in,   // all higher bits are 1
  output logic ones_out,  // this and all higher bits are 1
  output logic q          // counter bit
);
  logic qn;

  div2 u_div2 (.clk(clk), .rst_n(rst_n), .t(c_in), .q(q), .qn(qn));

  assign c_out    = c_in & (inc ? q : qn);
  assign zero_out = zero_in & qn;
  assign ones_out = ones_in & q;
endmodule
