// tb_udc: checks the up-down counter (bit slices and control slice) against a saturating
// reference model, for the plain counter and for the two-LSB-decrement variant (DN2), at a
// small width (4 bits, both ends of the range hit very often) and at the default width
// (10 bits). The commands are random with a bias that flips every 4000 clocks, so that the
// 10-bit counters also run into both ends. Also checks the integrator rate: a constant up rate
// of 1 raises the count by exactly one LSB per clock.
module tb_udc;
  localparam int W = 4;
  localparam int MAXV = (1 << W) - 1;
  localparam int WD = odlf_pkg::NBITS_DEFAULT;
  localparam int MAXD = (1 << WD) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up, dn;
  logic [W-1:0] y0, y1;
  logic sat0, sat1, sat2, sat3;
  logic [WD-1:0] y2, y3;
  int m0, m1, m2, m3;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0, n_ovf_d = 0, n_unf_d = 0;

  udc #(.W(W), .DN2(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .cnt_up(up), .cnt_dn(dn), .y(y0), .sat(sat0));
  udc #(.W(W), .DN2(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .cnt_up(up), .cnt_dn(dn), .y(y1), .sat(sat1));
  udc                      dut2 (.clk(clk), .rst_n(rst_n), .cnt_up(up), .cnt_dn(dn), .y(y2), .sat(sat2));
  udc #(.DN2(1'b1))        dut3 (.clk(clk), .rst_n(rst_n), .cnt_up(up), .cnt_dn(dn), .y(y3), .sat(sat3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int step0(int v, logic u, logic d, int maxv, output logic s);
    s = 1'b0;
    if (u && !d) begin if (v == maxv) s = 1'b1; else v++; end
    if (d && !u) begin if (v == 0) s = 1'b1; else v--; end
    return v;
  endfunction

  function automatic int step1(int v, logic u, logic d, int maxv, output logic s);
    s = 1'b0;
    if (u && !d) begin if (v == maxv) s = 1'b1; else v++; end
    if (d && !u) begin if (v < 2) s = 1'b1; else v -= 2; end
    if (d && u)  begin if (v == 0) s = 1'b1; else v--; end
    return v;
  endfunction

  initial begin
    logic s0, s1, s2, s3;
    up = 1'b0; dn = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m0 = 0; m1 = 0; m2 = 0; m3 = 0;
    // rate check: all-ones up input counts one LSB per sample
    @(negedge clk) begin up = 1'b1; dn = 1'b0; end
    for (int i = 0; i < 10; i++) @(posedge clk);
    #1 checks++; if (y0 != 10 || y1 != 10 || y2 != 10 || y3 != 10) failures++;
    m0 = 10; m1 = 10; m2 = 10; m3 = 10;
    // random commands, biased phases to reach both ends
    for (int i = 0; i < 40000; i++) begin
      int bias;
      bias = (i < 20000) ? (i / 200) % 2 : (i / 4000) % 2;
      @(negedge clk) begin
        up = ($urandom_range(0, 99) < (bias ? 70 : 30));
        dn = ($urandom_range(0, 99) < (bias ? 30 : 70));
        // saturation flag is combinational from the current value and commands
        #1 checks++;
        void'(step0(m0, up, dn, MAXV, s0));
        void'(step1(m1, up, dn, MAXV, s1));
        void'(step0(m2, up, dn, MAXD, s2));
        void'(step1(m3, up, dn, MAXD, s3));
        if (sat0 !== s0 || sat1 !== s1 || sat2 !== s2 || sat3 !== s3) failures++;
        if (s0 && up) n_ovf++;
        if (s0 && dn) n_unf++;
        if (s2 && up) n_ovf_d++;
        if (s2 && dn) n_unf_d++;
      end
      @(posedge clk) begin
        m0 = step0(m0, up, dn, MAXV, s0);
        m1 = step1(m1, up, dn, MAXV, s1);
        m2 = step0(m2, up, dn, MAXD, s2);
        m3 = step1(m3, up, dn, MAXD, s3);
      end
      #1;
      checks++;
      if (int'(y0) != m0 || int'(y1) != m1 || int'(y2) != m2 || int'(y3) != m3) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: y0=%0d m0=%0d y1=%0d m1=%0d", i, y0, m0, y1, m1);
      end
    end
    checks++; if (n_ovf == 0 || n_unf == 0) failures++;
    checks++; if (n_ovf_d == 0 || n_unf_d == 0) failures++;
    $display("overflow events %0d, underflow events %0d (4 bits); %0d, %0d (10 bits)",
             n_ovf, n_unf, n_ovf_d, n_unf_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
