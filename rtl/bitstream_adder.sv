// bitstream_adder: adder (or subtracter) of two one-bit pulse-rate signals.
//
// The two input bits and a one-bit remainder are added; the carry of that sum is the output
// bit and the sum bit is kept as the remainder for the next sample. This is a first order
// sigma-delta requantization of the two-bit sum back to one bit, so the output rate is
// (x1 + x2) / 2 with a bounded error. With SUBTRACT = 1 the second input is inverted, giving the
// rate (x1 + 1 - x2) / 2 = 1/2 + (x1 - x2) / 2. Logic as in the document's adder slice:
// sum = x1 ^ x2 ^ r, y = (x1 ^ x2) ? r : x1. The output is combinational in the sample;
// the remainder register updates at the clock edge and resets to 0.
module bitstream_adder #(
  parameter bit SUBTRACT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x1,
  input  logic x2,
  output logic y
);
  logic r;           // remainder (sum bit of the previous sample)
  logic x2i, p;

  assign x2i = SUBTRACT ? ~x2 : x2;
  assign p   = x1 ^ x2i;
  assign y   = p ? r : x1;

  always_ff @(posedge clk) begin
    if (!rst_n) r <= 1'b0;
    else        r <= p ^ r;
  end
endmodule
