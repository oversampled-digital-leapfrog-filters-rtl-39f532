// input_sync: input synchronization block of the lattice ODLF.
//
// N identical sync_slice cells (six on the benchmark filter: the filter input and the five
// coefficient rates) bring the external pulse-rate signals into the filter clock domain.
// Latency is two clocks for every signal, so their relative timing is kept.
module input_sync #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  for (genvar i = 0; i < N; i++) begin : g_slice
    sync_slice u_slice (.clk(clk), .rst_n(rst_n), .d(d[i]), .q(q[i]));
  end
endmodule
