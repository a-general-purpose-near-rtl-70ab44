// tb_context_buffer: loads random context rows and checks the stored fields and
// the decoded crossbar selects, set size and width flags; a row presented
// without load must not be taken.
module tb_context_buffer;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, load = 0;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [CFG_W-1:0] din = '0;
  ctx_t ctx; mode_e mode; dp_e dp; op_e opcode;
  logic [1:0] sel_a, sel_b, sel_p, sel_r;
  logic [4:0] set_size;
  logic w16, b16;
  context_buffer dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(logic c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ctx_t c;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      for (int w = 0; w < 16; w++) c[32*w +: 32] = $urandom();
      c.assoc = 3'($urandom_range(0, 4));
      @(negedge clk); din = c; load = 1;
      @(negedge clk); load = 0; din = ~c;
      @(negedge clk);
      chk(ctx == c, "stored row");
      chk(mode == mode_e'(c.mode) && dp == dp_e'(c.datapath) && opcode == op_e'(c.opcode), "mode/dp/op");
      chk({sel_r, sel_p, sel_b, sel_a} == c.xbar_config, "xbar selects");
      chk(set_size == 5'(1 << c.assoc), "set size");
      chk(w16 == c.data_width, "w16");
      chk(b16 == (c.data_width && (c.datapath == DP_SED || c.datapath == DP_ALU)), "b16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
