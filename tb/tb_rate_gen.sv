// tb_rate_gen: test stimulus, a pulse-rate source of rate num/den (first order sigma-delta:
// an accumulator adds num each clock and emits a one whenever it reaches den).
module tb_rate_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned num,
  input  int unsigned den,
  output logic        q
);
  int unsigned acc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= 0;
      q   <= 1'b0;
    end else if (acc + num >= den) begin
      acc <= acc + num - den;
      q   <= 1'b1;
    end else begin
      acc <= acc + num;
      q   <= 1'b0;
    end
  end
endmodule
