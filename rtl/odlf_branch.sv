// odlf_branch: leapfrog chain of UDC-RM pairs.
//
// Each pair k is an integrator with gain c_k: the up-down counter integrates the difference of
// its two pulse-rate inputs and the rate multiplier turns the counter value back into the
// one-bit state w_k = c_k * u_k. The chain realises the leapfrog equations of a ladder that
// starts with a shunt capacitor (all variables are rates in [0,1]):
//   s w_0 = c_0 (E - w_0 - w_1)            first pair, generator resistor and first feedback
//   s w_k = c_k (w_(k-1) - w_(k+1))         inner pairs
//   s w_N = c_N (w_(N-1) - RI0)             last pair, LOAD = LOAD_BIAS (lattice branch)
//   s w_N = c_N (w_(N-1) - w_N)             last pair, LOAD = LOAD_SELF (load resistor, ladder)
// The RM output of one pair drives the increment input of the next pair and the decrement input
// of the previous one. The first pair has two decrementing inputs; as in the document they are
// merged by a bit-stream adder, whose gain of 1/2 this design compensates with a two-LSB
// decrement step in that counter (udc DN2 = 1). RI0 is a constant pulse rate applied as bias so
// that all state variables stay positive with unsigned arithmetic.
//
// Counter k has NBITS + EXTRA[k] bits; its upper NBITS bits drive the RM. The extra LSBs carry
// the power-of-two part of the coefficient (each extra LSB halves the integrator gain) so that
// the coefficient rate itself can stay in [1/2, 1].
//
// Timing: one clock per sample. States w are combinational from the registered counters,
// dither counters and coefficient bits; every counter updates at each clock edge.
module odlf_branch
  import odlf_pkg::*;
#(
  parameter int unsigned NBITS = NBITS_DEFAULT,
  parameter int unsigned ORDER = ORDER_A,
  parameter lsb_array_t  EXTRA = EXTRA_A_DEFAULT,
  parameter load_e       LOAD  = LOAD_BIAS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             e_in,              // filter input pulse rate (E_G, with offset)
  input  logic [ORDER-1:0] coef,              // coefficient pulse rates c_0 .. c_(ORDER-1)
  input  logic             bias,              // RI0 pulse rate (used with LOAD_BIAS only)
  output logic [ORDER-1:0] w,                 // state variables (RM outputs)
  output logic [NBITS-1:0] x [ORDER],         // RM inputs (upper NBITS bits of each counter)
  output logic [ORDER-1:0] sat                // saturation events per counter
);
  logic dn0;   // merged decrement input of the first pair

  bitstream_adder #(.SUBTRACT(1'b0)) u_add0 (
    .clk(clk), .rst_n(rst_n), .x1(w[0]), .x2(w[1]), .y(dn0)
  );

  for (genvar k = 0; k < ORDER; k++) begin : g_pair
    localparam int unsigned WK = NBITS + EXTRA[k];
    logic          up_k, dn_k;
    logic [WK-1:0] u_k;

    if (k == 0) begin : g_first
      assign up_k = e_in;
      assign dn_k = dn0;
    end else if (k == ORDER - 1) begin : g_last
      assign up_k = w[k-1];
      assign dn_k = (LOAD == LOAD_BIAS) ? bias : w[k];
    end else begin : g_inner
      assign up_k = w[k-1];
      assign dn_k = w[k+1];
    end

    udc #(.W(WK), .DN2(k == 0)) u_udc (
      .clk(clk), .rst_n(rst_n), .cnt_up(up_k), .cnt_dn(dn_k), .y(u_k), .sat(sat[k])
    );

    assign x[k] = u_k[WK-1 -: NBITS];

    rm #(.W(NBITS)) u_rm (
      .clk(clk), .rst_n(rst_n), .x(x[k]), .c(coef[k]), .y(w[k])
    );

    if (EXTRA[k] > 0) begin : g_lsb
      // The extra counter LSBs scale the integrator only; the RM does not read them.
      logic unused_lsb;
      assign unused_lsb = ^u_k[EXTRA[k]-1:0];
    end
  end

  // With LOAD_SELF the bias input is not used.
  logic unused_bias;
  assign unused_bias = bias;

  initial begin
    assert (ORDER >= 2 && ORDER <= MAX_ORDER)
      else $error("odlf_branch: ORDER must be between 2 and %0d", MAX_ORDER);
  end
endmodule
