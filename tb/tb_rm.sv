// tb_rm: checks the rate multiplier at its default width (10 bits).
//  1. Sample-exact comparison with a reference model (down-counting dither counter read
//     bit-reversed, output = c & carry(x + dither)) under random x and c.
//  2. With constant inputs and c = 1 the output holds exactly x ones in every 2^W samples
//     and repeats with period 2^W.
//  3. With c at rate 3/4 the output holds exactly x ones per 2^W coefficient pulses.
module tb_rm;
  localparam int W = odlf_pkg::NBITS_DEFAULT;
  localparam int N = 1 << W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x;
  logic c, y;
  int cnt_m;   // model dither counter
  int checks = 0, failures = 0;

  rm dut (.clk(clk), .rst_n(rst_n), .x(x), .c(c), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int v);
    int r = 0;
    for (int i = 0; i < W; i++) if (v[i]) r |= 1 << (W - 1 - i);
    return r;
  endfunction

  function automatic logic model_y(int xv, logic cv, int cnt);
    return cv && ((xv + bitrev(cnt)) >= N);
  endfunction

  initial begin
    x = '0; c = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cnt_m = 0;
    // 1. random
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk) begin
        x = W'($urandom_range(0, N - 1));
        c = 1'($urandom_range(0, 1));
        #1 checks++;
        if (y !== model_y(int'(x), c, cnt_m)) begin
          failures++;
          if (failures < 5) $display("mismatch %0d: x=%0d c=%b y=%b", i, x, c, y);
        end
      end
      @(posedge clk) if (c) cnt_m = (cnt_m + N - 1) % N;
    end
    // 2. constant inputs, c = 1: exactly x ones per period, period 2^W
    for (int xv = 0; xv < N; xv += 11) begin
      logic pat [N];
      int ones;
      ones = 0;
      @(negedge clk) begin x = W'(xv); c = 1'b1; end
      for (int i = 0; i < N; i++) begin
        #1 pat[i] = y; ones += int'(y);
        @(negedge clk);
      end
      checks++; if (ones != xv) begin failures++; $display("x=%0d ones=%0d", xv, ones); end
      for (int i = 0; i < N; i++) begin
        #1 checks++; if (y !== pat[i]) failures++;
        @(negedge clk);
      end
    end
    // 3. coefficient rate 3/4 (pattern 1,1,1,0): x ones per 2^W coefficient pulses
    for (int xv = 3; xv < N; xv += 37) begin
      int ones, pulses, ph;
      ones = 0; pulses = 0; ph = 0;
      @(negedge clk) x = W'(xv);
      while (pulses < N) begin
        c = (ph != 3);
        ph = (ph + 1) % 4;
        #1 ones += int'(y); pulses += int'(c);
        @(negedge clk);
      end
      c = 1'b0;
      checks++; if (ones != xv) begin failures++; $display("c=3/4 x=%0d ones=%0d", xv, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
