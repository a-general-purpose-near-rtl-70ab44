// tb_sram_cut: random byte-masked writes and reads against a reference array;
// checks the one-cycle read latency and that rdata holds while disabled.
module tb_sram_cut;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [3:0] be = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  sram_cut #(.DEPTH(64)) dut (.*);
  logic [31:0] ref_m [64];
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); en = 1; we = 1; be = 4'hf; addr = 6'(i); wdata = $urandom(); ref_m[i] = wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom()); we = 1'($urandom_range(0, 1)); be = 4'($urandom()); wdata = $urandom();
      if (we) begin
        for (int b = 0; b < 4; b++) if (be[b]) ref_m[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        automatic logic [31:0] e = ref_m[addr];
        @(negedge clk); en = 0; we = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL read %h exp %h", rdata, e); end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
