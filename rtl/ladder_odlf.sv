// ladder_odlf: ladder oversampled digital leapfrog filter (all-pole low-pass).
//
// Simulates an LC ladder terminated in equal resistances at both ends, starting and ending with
// a shunt capacitor: a leapfrog chain of ORDER UDC-RM pairs whose last integrator is closed on
// its own state (the load resistor). The output is the last state, the voltage on the load,
// U2 = w_N, with DC gain 1/2 (all states settle to E/2 for a constant input E). The chain is
// shared with the lattice branch (odlf_branch with LOAD_SELF). Coefficient rates are
// c_k = 1/(R C_k) or R/L_k scaled to [0,1]. The output is registered (one clock).
module ladder_odlf
  import odlf_pkg::*;
#(
  parameter int unsigned NBITS = NBITS_DEFAULT,
  parameter int unsigned ORDER = 5,
  parameter lsb_array_t  EXTRA = EXTRA_NONE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             e_in,          // input pulse rate E
  input  logic [ORDER-1:0] coef,          // coefficient rates
  output logic             y,             // output pulse rate U2
  output logic [ORDER-1:0] w,             // states
  output logic [NBITS-1:0] x [ORDER],     // RM inputs
  output logic [ORDER-1:0] sat            // counter saturation events
);
  odlf_branch #(.NBITS(NBITS), .ORDER(ORDER), .EXTRA(EXTRA), .LOAD(LOAD_SELF)) u_chain (
    .clk(clk), .rst_n(rst_n), .e_in(e_in), .coef(coef), .bias(1'b0),
    .w(w), .x(x), .sat(sat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) y <= 1'b0;
    else        y <= w[ORDER-1];
  end
endmodule
