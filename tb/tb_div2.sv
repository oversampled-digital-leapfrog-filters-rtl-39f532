// tb_div2: checks the divider by two against a reference toggle model under random toggle
// requests, and that reset clears it.
module tb_div2;
  logic clk = 1'b0, rst_n = 1'b0, t = 1'b0;
  logic q, qn;
  logic model;
  int checks = 0, failures = 0;

  div2 dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    repeat (3) @(posedge clk);
    #1 checks++; if (q !== 1'b0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk) t = 1'($urandom_range(0, 1));
      @(posedge clk) if (t) model = ~model;
      #1;
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: q=%b model=%b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
