// tb_sine_gen: test stimulus, a pulse-rate source whose rate follows
// offset + amp * sin(2 pi n / period) (first order sigma-delta on a real accumulator).
// n counts clocks since reset; the testbench correlates against the same n.
module tb_sine_gen (
  input  logic clk,
  input  logic rst_n,
  input  real  offset,
  input  real  amp,
  input  real  period,
  output logic q,
  output longint n
);
  real acc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= 0.0;
      q   <= 1'b0;
      n   <= 0;
    end else begin
      real v;
      v = acc + offset + amp * $sin(2.0 * 3.14159265358979 * real'(n) / period);
      if (v >= 1.0) begin
        q   <= 1'b1;
        acc <= v - 1.0;
      end else begin
        q   <= 1'b0;
        acc <= v;
      end
      n <= n + 1;
    end
  end
endmodule
