// lattice_odlf: lattice oversampled digital leapfrog filter.
//
// A doubly terminated symmetrical LC lattice is simulated by two branches fed by the same
// generator: branch a (order ORDER_A) and branch b (order ORDER_B), each a leapfrog chain for a
// singly loaded ladder with the bias RI0 on its last integrator. With w_a1 and w_b1 the first
// states of the branches (the voltages on the branch impedances):
//   direct output          2 U2  = w_b1 - w_a1        (H = H_b - H_a)
//   complementary output   2 U2c = E - w_a1 - w_b1    (Hc = 1 - H_a - H_b)
// Two bit-stream adder slices form the outputs:
//   y_lp  = subtracter(w_b1, w_a1), rate 1/2 + (w_b1 - w_a1)/2 = 1/2 + U2
//   y_sum = adder(w_a1, w_b1),      rate (w_a1 + w_b1)/2, so that 2 U2c = E - 2 y_sum.
// Taking the sum rate as the second output slice is this design's reading of the document's
// "two adder slices for the complementary outputs".
//
// The input e_in must carry the offset U0 (0.75 for RI0 = 1/2). All inputs are expected already
// synchronous to clk. Outputs are registered: one clock after the states they are made of.
module lattice_odlf
  import odlf_pkg::*;
#(
  parameter int unsigned NBITS = NBITS_DEFAULT,
  parameter int unsigned NA    = ORDER_A,
  parameter int unsigned NB    = ORDER_B,
  parameter lsb_array_t  EXTRA_A = EXTRA_A_DEFAULT,
  parameter lsb_array_t  EXTRA_B = EXTRA_B_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             e_in,            // input pulse rate E (with offset U0)
  input  logic [NA-1:0]    coef_a,          // coefficient rates of branch a
  input  logic [NB-1:0]    coef_b,          // coefficient rates of branch b
  input  logic             bias,            // RI0 pulse rate
  output logic             y_lp,            // direct (low-pass) output pulse rate
  output logic             y_sum,           // (w_a1 + w_b1) / 2 pulse rate
  output logic [NA-1:0]    w_a,             // states of branch a
  output logic [NB-1:0]    w_b,             // states of branch b
  output logic [NBITS-1:0] x_a [NA],        // RM inputs of branch a
  output logic [NBITS-1:0] x_b [NB],        // RM inputs of branch b
  output logic [NA-1:0]    sat_a,           // counter saturation events, branch a
  output logic [NB-1:0]    sat_b            // counter saturation events, branch b
);
  logic lp_c, sum_c;

  odlf_branch #(.NBITS(NBITS), .ORDER(NA), .EXTRA(EXTRA_A), .LOAD(LOAD_BIAS)) u_branch_a (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef_a), .bias(bias),
    .w(w_a), .x(x_a), .sat(sat_a)
  );

  odlf_branch #(.NBITS(NBITS), .ORDER(NB), .EXTRA(EXTRA_B), .LOAD(LOAD_BIAS)) u_branch_b (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef_b), .bias(bias),
    .w(w_b), .x(x_b), .sat(sat_b)
  );

  bitstream_adder #(.SUBTRACT(1'b1)) u_out_lp (
    .clk(clk), .rst_n(rst_n), .x1(w_b[0]), .x2(w_a[0]), .y(lp_c)
  );

  bitstream_adder #(.SUBTRACT(1'b0)) u_out_sum (
    .clk(clk), .rst_n(rst_n), .x1(w_a[0]), .x2(w_b[0]), .y(sum_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_lp  <= 1'b0;
      y_sum <= 1'b0;
    end else begin
      y_lp  <= lp_c;
      y_sum <= sum_c;
    end
  end
endmodule
