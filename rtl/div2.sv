// div2: divider by two, the storage cell of every counter bit slice.
//
// The bit q inverts on every clock edge at which the toggle request t is high, so a train of
// t pulses is divided by two at q. The complementary output qn corresponds to the cell's C
// output. In the original cell the toggle request is the cell's own clock (an asynchronous
// ripple counter built from race-free static or semi-dynamic CMOS dividers); here every cell
// runs on the common sample clock and t acts as a toggle enable, which gives the same count
// sequence one sample at a time. Synchronous active-low reset clears q.
module div2 (
  input  logic clk,
  input  logic rst_n,
  input  logic t,     // toggle request (the carry pulse of the preceding slice)
  output logic q,     // divided output (B)
  output logic qn     // complementary output (C)
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= 1'b0;
    else if (t)  q <= ~q;
  end
  assign qn = ~q;
endmodule
