// sync_slice: one slice of the input synchronization block.
//
// Pulse-rate inputs (filter input, coefficients) come from outside the filter clock domain.
// Two flip-flops in series sample the input level on the filter clock, so each sample of the
// output is a clean 1 or 0 and a steady high input becomes a run of ones (amplitude 1). The
// output follows the input with two clocks of delay. Reset clears both flip-flops. The two-flop
// structure is this design's choice; the document only states that the block synchronizes the
// input and the coefficients to the clock and is built from identical slices.
module sync_slice (
  input  logic clk,
  input  logic rst_n,
  input  logic d,     // asynchronous pulse-rate input
  output logic q      // synchronized pulse-rate sample
);
  logic meta;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
