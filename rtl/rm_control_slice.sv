// rm_control_slice: control slice of the rate multiplier.
//
// The coefficient pulse c steps the dither counter (carry into the counter LSB) and gates the
// quantized input: y = c & add_c_out, where add_c_out is the MSB of input plus dither. In the
// two-phase original the output is latched in phase 2 and the counter steps in phase 1; here
// both happen in the same sample: y uses the dither value present in this sample and the
// counter steps at the following clock edge, so every coefficient pulse meets a new dither value.
// cnt_c_in is c itself; it is a port so the slice, like the original, owns the counter's
// carry input.
module rm_control_slice (
  input  logic c,          // coefficient pulse rate
  input  logic add_c_out,  // MSB of input + dither
  output logic cnt_c_in,   // carry into the dither counter LSB
  output logic y           // rate multiplier output
);
  assign cnt_c_in = c;
  assign y        = c & add_c_out;
endmodule
