// tb_bitstream_adder: checks the bit-stream adder and subtracter against a reference model
// (one-bit remainder, output = carry of x1 + x2 + remainder) and checks the rate: after n
// samples the output count is within one of (n1 + n2)/2 for the adder and of
// (n + n1 - n2)/2 for the subtracter.
module tb_bitstream_adder;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x1, x2, ya, ys;
  int ra, rs;
  int n1 = 0, n2 = 0, na = 0, ns = 0, n = 0;
  int checks = 0, failures = 0;

  bitstream_adder #(.SUBTRACT(1'b0)) dut_a (.clk(clk), .rst_n(rst_n), .x1(x1), .x2(x2), .y(ya));
  bitstream_adder #(.SUBTRACT(1'b1)) dut_s (.clk(clk), .rst_n(rst_n), .x1(x1), .x2(x2), .y(ys));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p1, p2;
    x1 = 1'b0; x2 = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ra = 0; rs = 0;
    for (int i = 0; i < 20000; i++) begin
      if (i % 1000 == 0) begin p1 = $urandom_range(0, 100); p2 = $urandom_range(0, 100); end
      // the first sample is applied in the same negedge that releases reset
      if (i != 0) @(negedge clk);
      begin
        int sa, ss;
        x1 = ($urandom_range(0, 99) < p1);
        x2 = ($urandom_range(0, 99) < p2);
        sa = int'(x1) + int'(x2) + ra;
        ss = int'(x1) + int'(!x2) + rs;
        #1 checks++;
        if (ya !== (sa >= 2) || ys !== (ss >= 2)) begin
          failures++;
          if (failures < 4) $display("i=%0d x1=%b x2=%b ra=%0d ya=%b rs=%0d ys=%b", i, x1, x2, ra, ya, rs, ys);
        end
        ra = sa % 2; rs = ss % 2;
        n++; n1 += int'(x1); n2 += int'(x2); na += int'(ya); ns += int'(ys);
        checks++;
        if (2 * na > n1 + n2 + 1 || 2 * na < n1 + n2 - 1) failures++;
        if (2 * ns > n + n1 - n2 + 1 || 2 * ns < n + n1 - n2 - 1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
