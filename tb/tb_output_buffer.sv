// tb_output_buffer: presents lane results with the stagger of systolic sets
// (member j one cycle after member j-1) and aligned in independent flow, and
// checks that each group comes out as one row write with all its lanes, at
// consecutive rows from the base, and with the right lane mask.
module tb_output_buffer;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, sys_en, w16;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [2:0] assoc;
  logic [ROW_W-1:0] base = 11'd50, rows_written;
  lane_out_t in [NLANES];
  mreq_t wr;
  output_buffer dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int l = 0; l < NLANES; l++) in[l] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 20; cfg++) begin
      automatic int writes = 0;
      logic [31:0] val [4][NLANES];
      sys_en = cfg % 2; w16 = (cfg / 2) % 2; assoc = 3'(cfg % (w16 ? 4 : 5));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int g = 0; g < 4; g++) for (int l = 0; l < NLANES; l++) val[g][l] = $urandom();
      // 4 groups, 24 cycles apart, staggered by position
      for (int t = 0; t < 4 * 24 + 24; t++) begin
        for (int l = 0; l < NLANES; l++) begin
          automatic int step = w16 ? 2 : 1;
          automatic int pos = sys_en ? ((l / step) % (1 << assoc)) : 0;
          automatic int g = (t - pos) / 24;
          in[l] = '0;
          if (w16 && l % 2 == 1) continue;
          if (t - pos >= 0 && (t - pos) % 24 == 0 && g < 4) begin
            in[l].valid = 1; in[l].data = val[g][l];
          end
        end
        @(posedge clk); #1;
        if (wr.en) begin
          checks++;
          if (writes >= 4 || wr.row != base + 11'(writes) || wr.lane_we != (w16 ? 16'h5555 : 16'hffff)) begin
            failures++; $display("FAIL cfg=%0d write %0d row %0d mask %h", cfg, writes, wr.row, wr.lane_we);
          end else
            for (int l = 0; l < NLANES; l += (w16 ? 2 : 1)) begin
              checks++;
              if (wr.wdata[32*l +: 32] != val[writes][l]) begin failures++; $display("FAIL data lane %0d", l); end
            end
          writes++;
        end
        @(negedge clk);
      end
      checks++;
      if (writes != 4) begin failures++; $display("FAIL cfg=%0d writes %0d", cfg, writes); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
