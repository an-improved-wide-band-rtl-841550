// tb_pulse_generator: checks the power-on EN pulse.
//
// EN must be high while por_n is low, stay high for exactly EN_CYCLES
// (16) clock edges after por_n rises, and then stay low. A second
// power-on event must produce the same pulse again.
module tb_pulse_generator;
  logic clk = 1'b0;
  logic por_n, en;
  int checks = 0, failures = 0;

  pulse_generator dut (.clk(clk), .por_n(por_n), .en(en));

  always #5 clk = ~clk;

  task automatic expect_en(logic exp, string what);
    checks++;
    if (en !== exp) begin
      failures++;
      $display("FAIL %s at %0t: en=%0b", what, $time, en);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      int width;
      por_n = 1'b0;
      #17;
      expect_en(1'b1, "during por");
      repeat (3) @(posedge clk);
      expect_en(1'b1, "during por, clocked");
      @(negedge clk) por_n = 1'b1;
      width = 0;
      while (en && width < 100) begin
        @(posedge clk); #1;
        width++;
      end
      checks++;
      if (width != 16) begin
        failures++;
        $display("FAIL EN width %0d edges, expected 16", width);
      end
      repeat (50) begin
        @(posedge clk); #1;
        expect_en(1'b0, "after pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
