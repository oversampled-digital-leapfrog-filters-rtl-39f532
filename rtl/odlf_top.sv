// odlf_top: the fifth order lattice ODLF of the benchmark design, with its input
// synchronization block, and a fifth order ladder ODLF beside it with its own ports.
//
// Lattice filter (the benchmark CCITT G.712 low-pass, 5th order elliptic): the filter input and
// its five coefficient rates arrive as asynchronous pulse-rate signals and pass through six
// identical synchronizer slices (two clocks). Coefficient order on coef_in: a1, a2, a3, b1, b2;
// for the benchmark the rates are 9/16, 1, 1, 1, 9/16 with the default extra counter LSBs
// (coefficients 9/16, 1/4, 1, 1/2, 9/16). ri0 is the bias rate RI0 (1/2 in the document's working
// point, then the input offset is U0 = 3/4). Outputs: lp_out (rate 1/2 + U2, the filter output)
// and sum_out (rate (w_a1 + w_b1)/2; the complementary output is E - 2 * sum_out).
// Observation ports bring out the five counter values seen by the RMs and the saturation events.
//
// Ladder filter: input and five coefficients, also through synchronizer slices; output is the
// voltage on the load, U2 = w_5.
//
// Allpass filter: one lattice branch of order ORDER_A on its own input, coefficients and bias,
// with its input and coefficients through four more synchronizer slices; output rate
// 1/2 + (E - 2 U1)/4. The allpass is the document's alteration of the lattice branch, and
// bringing it out beside the lattice is this design's choice.
//
// Coefficient generator: the reference rate (998/1024 of the clock, the coefficient 1 for a
// 40 MHz clock) and the five scaled benchmark coefficient rates derived from it, on their own
// output ports so that they can be wired back to coef_in / ap_coef_in outside.
//
// One clock per filter sample. The document's benchmark runs the 10-bit filter at about 39 MHz,
// giving a pass-band edge near 3 kHz.
module odlf_top
  import odlf_pkg::*;
#(
  parameter int unsigned NBITS   = NBITS_DEFAULT,
  parameter lsb_array_t  EXTRA_A = EXTRA_A_DEFAULT,
  parameter lsb_array_t  EXTRA_B = EXTRA_B_DEFAULT,
  parameter int unsigned LADDER_ORDER = 5,
  parameter lsb_array_t  EXTRA_L = EXTRA_NONE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lattice ODLF
  input  logic                    x_in,                       // input pulse rate (asynchronous)
  input  logic [ORDER_A+ORDER_B-1:0] coef_in,                 // a1,a2,a3,b1,b2 rates (asynchronous)
  input  logic                    ri0,                        // bias rate, synchronous
  output logic                    lp_out,                     // direct output
  output logic                    sum_out,                    // branch sum output
  output logic [NBITS-1:0]        x_lat [ORDER_A+ORDER_B],    // RM inputs a1,a2,a3,b1,b2
  output logic [ORDER_A+ORDER_B-1:0] sat_lat,                 // saturation events a1..b2
  // ladder ODLF
  input  logic                    lad_x_in,                   // input pulse rate (asynchronous)
  input  logic [LADDER_ORDER-1:0] lad_coef_in,                // coefficient rates (asynchronous)
  output logic                    lad_out,                    // output pulse rate
  output logic [NBITS-1:0]        x_lad [LADDER_ORDER],       // RM inputs
  output logic [LADDER_ORDER-1:0] sat_lad,                    // saturation events
  // allpass ODLF
  input  logic                    ap_x_in,                    // input pulse rate (asynchronous)
  input  logic [ORDER_A-1:0]      ap_coef_in,                 // coefficient rates (asynchronous)
  input  logic                    ap_ri0,                     // bias rate, synchronous
  output logic                    ap_out,                     // 1/2 + (E - 2 U1)/4
  output logic [NBITS-1:0]        x_ap [ORDER_A],             // RM inputs
  output logic [ORDER_A-1:0]      sat_ap,                     // saturation events
  // coefficient generator
  output logic                    cg_ref,                     // reference rate (coefficient 1)
  output logic [ORDER_A+ORDER_B-1:0] cg_coef                  // a1,a2,a3,b1,b2 rates
);
  localparam int unsigned NS = 1 + ORDER_A + ORDER_B;   // six synchronizer slices

  logic [NS-1:0] s_lat;
  logic [ORDER_A-1:0] w_a;
  logic [ORDER_B-1:0] w_b;
  logic [NBITS-1:0]   x_a [ORDER_A];
  logic [NBITS-1:0]   x_b [ORDER_B];
  logic [ORDER_A-1:0] sat_a;
  logic [ORDER_B-1:0] sat_b;

  input_sync #(.N(NS)) u_sync (
    .clk(clk), .rst_n(rst_n), .d({coef_in, x_in}), .q(s_lat)
  );

  lattice_odlf #(.NBITS(NBITS), .NA(ORDER_A), .NB(ORDER_B),
                 .EXTRA_A(EXTRA_A), .EXTRA_B(EXTRA_B)) u_lattice (
    .clk(clk), .rst_n(rst_n),
    .e_in(s_lat[0]), .coef_a(s_lat[ORDER_A:1]), .coef_b(s_lat[NS-1:ORDER_A+1]),
    .bias(ri0), .y_lp(lp_out), .y_sum(sum_out),
    .w_a(w_a), .w_b(w_b), .x_a(x_a), .x_b(x_b), .sat_a(sat_a), .sat_b(sat_b)
  );

  for (genvar k = 0; k < ORDER_A; k++) begin : g_xa
    assign x_lat[k] = x_a[k];
  end
  for (genvar k = 0; k < ORDER_B; k++) begin : g_xb
    assign x_lat[ORDER_A + k] = x_b[k];
  end
  assign sat_lat = {sat_b, sat_a};

  // The states themselves are internal; the outputs are built from them.
  logic unused_states;
  assign unused_states = ^{w_a, w_b};

  // Ladder ODLF with its own synchronizer slices.
  logic [LADDER_ORDER:0]   s_lad;
  logic [LADDER_ORDER-1:0] w_lad;

  input_sync #(.N(LADDER_ORDER + 1)) u_sync_lad (
    .clk(clk), .rst_n(rst_n), .d({lad_coef_in, lad_x_in}), .q(s_lad)
  );

  ladder_odlf #(.NBITS(NBITS), .ORDER(LADDER_ORDER), .EXTRA(EXTRA_L)) u_ladder (
    .clk(clk), .rst_n(rst_n), .e_in(s_lad[0]), .coef(s_lad[LADDER_ORDER:1]),
    .y(lad_out), .w(w_lad), .x(x_lad), .sat(sat_lad)
  );

  logic unused_lad_states;
  assign unused_lad_states = ^w_lad;

  logic [ORDER_A:0]   s_ap;
  logic [ORDER_A-1:0] w_ap;

  input_sync #(.N(ORDER_A + 1)) u_sync_ap (
    .clk(clk), .rst_n(rst_n), .d({ap_coef_in, ap_x_in}), .q(s_ap)
  );

  allpass_odlf #(.NBITS(NBITS), .ORDER(ORDER_A), .EXTRA(EXTRA_A)) u_allpass (
    .clk(clk), .rst_n(rst_n), .e_in(s_ap[0]), .coef(s_ap[ORDER_A:1]), .bias(ap_ri0),
    .y(ap_out), .w(w_ap), .x(x_ap), .sat(sat_ap)
  );

  logic unused_ap_states;
  assign unused_ap_states = ^w_ap;

  coefficient_generator #(.W(NBITS), .N(ORDER_A + ORDER_B)) u_coef_gen (
    .clk(clk), .rst_n(rst_n), .ref_out(cg_ref), .coef(cg_coef)
  );
endmodule
