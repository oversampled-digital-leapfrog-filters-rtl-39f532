// allpass_odlf: allpass oversampled digital leapfrog filter built from one lattice branch.
//
// A single lattice branch simulates a singly loaded LC ladder whose input impedance Z is
// reactive, so the voltage U1 on it gives the allpass function (E - 2 U1) / E = (R - Z)/(R + Z)
// whatever the coefficient values are. The branch is the same leapfrog chain as in the lattice
// filter (odlf_branch, bias RI0 on the last integrator). The output needs E - 2 U1, which is
// formed without a doubling stage: a bit-stream adder with a constant zero on one input halves
// the input rate to E/2, and a subtracter slice then gives
//   y = 1/2 + (E/2 - w_1)/2 = 1/2 + (E - 2 U1)/4,
// that is the allpass signal with gain 1/4 around the offset 1/2 (plus a DC term set by the
// working point: with E = U0 and the branch at rest, w_1 = U0 - RI0 for an odd order branch).
// The allpass function itself and its output equation follow the document; the way E - 2 U1 is
// scaled into one pulse rate is this design's choice.
//
// Interface and timing: all inputs synchronous to clk, one clock per sample; y is registered
// one clock after the state it is made of. w, x and sat observe the branch as in lattice_odlf.
module allpass_odlf
  import odlf_pkg::*;
#(
  parameter int unsigned NBITS = NBITS_DEFAULT,
  parameter int unsigned ORDER = ORDER_A,
  parameter lsb_array_t  EXTRA = EXTRA_A_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             e_in,          // input pulse rate E (with offset)
  input  logic [ORDER-1:0] coef,          // coefficient rates of the branch
  input  logic             bias,          // RI0 pulse rate
  output logic             y,             // 1/2 + (E - 2 U1)/4
  output logic [ORDER-1:0] w,             // branch states
  output logic [NBITS-1:0] x [ORDER],     // RM inputs
  output logic [ORDER-1:0] sat            // counter saturation events
);
  logic e_half, y_c;

  odlf_branch #(.NBITS(NBITS), .ORDER(ORDER), .EXTRA(EXTRA), .LOAD(LOAD_BIAS)) u_branch (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef), .bias(bias),
    .w(w), .x(x), .sat(sat)
  );

  bitstream_adder #(.SUBTRACT(1'b0)) u_half (
    .clk(clk), .rst_n(rst_n), .x1(e_in), .x2(1'b0), .y(e_half)
  );

  bitstream_adder #(.SUBTRACT(1'b1)) u_out (
    .clk(clk), .rst_n(rst_n), .x1(e_half), .x2(w[0]), .y(y_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) y <= 1'b0;
    else        y <= y_c;
  end
endmodule
