// tb_clock_gate: counts gated clock edges for random enable patterns that
// change right after rising edges; each cycle must pulse exactly when enable
// was high before the edge, and gclk must stay low while clk is low.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  clock_gate dut (.*);
  int checks = 0, failures = 0, pulses = 0, expected = 0;
  always @(posedge gclk) pulses++;
  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      #1 en = 1'($urandom_range(0, 1));
      if (en) expected++;
      @(negedge clk); #1;
      checks++;
      if (gclk) begin failures++; $display("FAIL gclk high while clk low"); end
      @(posedge clk); #0;
    end
    #2;
    checks++;
    if (pulses != expected) begin failures++; $display("FAIL pulses %0d exp %0d", pulses, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
