// udc_control_slice: control slice of the up-down counter.
//
// It turns the increment and decrement commands into the count direction inc and the carry
// pulse into the LSB slice, and inhibits the carry at the ends of the range so that the counter
// saturates instead of wrapping around: a pulse is issued when cnt_up is active while cnt_dn
// and ovf are not, or when cnt_dn is active while cnt_up and unf are not. Both commands at once
// cancel. inc follows cnt_up.
//
// DN2 = 1 selects the variant used for the first counter of a leapfrog chain, whose decrement
// input comes from a bit-stream adder of gain 1/2: a decrement then weighs two LSBs, entering as
// a carry into slice 1 (c_in1), and both commands at once give a net decrement of one LSB
// (c_in0 in count-down mode). unf_hi (bits above the LSB all zero) blocks the two-LSB step.
// This weighting is a choice of this design; the document does not say how the adder's gain
// of 1/2 is compensated. With the default DN2 = 0, c_in1 is constant 0 and inc is cnt_up
// itself; both stay as ports so that the two variants share one slice interface.
module udc_control_slice #(
  parameter bit DN2 = 1'b0
) (
  input  logic cnt_up,
  input  logic cnt_dn,
  input  logic ovf,      // all counter bits are 1
  input  logic unf,      // all counter bits are 0
  input  logic unf_hi,   // all counter bits above the LSB are 0
  output logic inc,      // count direction for all bit slices
  output logic c_in0,    // carry pulse into slice 0
  output logic c_in1,    // carry pulse into slice 1 (DN2 only)
  output logic sat       // a command was inhibited by saturation this sample
);
  always_comb begin
    inc   = cnt_up;
    c_in0 = 1'b0;
    c_in1 = 1'b0;
    sat   = 1'b0;
    if (!DN2) begin
      c_in0 = (cnt_up & ~cnt_dn & ~ovf) | (cnt_dn & ~cnt_up & ~unf);
      sat   = (cnt_up & ~cnt_dn & ovf)  | (cnt_dn & ~cnt_up & unf);
    end else begin
      unique case ({cnt_up, cnt_dn})
        2'b10: begin c_in0 = ~ovf;    sat = ovf;    end
        2'b01: begin c_in1 = ~unf_hi; sat = unf_hi; end
        2'b11: begin inc = 1'b0; c_in0 = ~unf; sat = unf; end
        default: ;
      endcase
    end
  end
endmodule
