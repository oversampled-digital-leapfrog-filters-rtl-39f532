// tb_input_sync: checks that each of the six synchronizer slices passes its input through with
// exactly two clocks of delay and that reset clears the outputs.
module tb_input_sync;
  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d, q;
  logic [N-1:0] hist [3];
  int checks = 0, failures = 0;

  input_sync #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (3) @(posedge clk);
    #1 checks++; if (q !== '0) failures++;
    @(negedge clk) rst_n = 1'b1;
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) d = N'($urandom);
      @(posedge clk) begin hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d; end
      #1 if (i >= 2) begin
        checks++;
        if (q !== hist[1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
