// tb_controller: feeds an FC context row and checks the sequence IDLE ->
// CONFIG (one context read of MEM3) -> EXE -> DRAIN -> IDLE: the number of
// beats, the rows requested for A, B and Psum (element packing included), the
// beat flags delayed one cycle, and the time to done.
module tb_controller;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, ndp_en = 0;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [CFG_W-1:0] cfg_row;
  logic cfg_rd, busy, done, exe, start_op, w16, b16, a_en, b_en, p_en, beat_valid;
  logic [ROW_W-1:0] cfg_addr, a_row, b_row, p_row;
  ctx_t ctx; mode_e mode; dp_e dp; op_e opcode;
  logic [1:0] sel_a, sel_b, sel_p, sel_r, a_sub, b_sub;
  tag_t beat_tag;
  controller dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(logic c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ctx_t c = '0;
    int cfg_reads = 0, beats = 0, cyc = 0, lasts = 0;
    localparam int IN = 6, OUT = 16;
    c.mode = MODE_FC; c.assoc = 3; c.data_width = 1; c.datapath = DP_MAC;
    c.addr_a_start = 100; c.addr_b_start = 200; c.addr_psum_start = 300;
    c.in_len = IN - 1; c.out_len = OUT - 1; c.xbar_config = 8'b11_10_01_00;
    cfg_row = c;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(!busy, "idle after reset");
    @(negedge clk); ndp_en = 1;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1;
      ndp_en = 0;
      cyc++;
      if (cfg_rd) begin cfg_reads++; chk(cfg_addr == 0, "context row"); end
      if (a_en) begin
        automatic int o = beats / IN, i = beats % IN;
        chk(a_row == 11'(100 + i / 2), "A row (16-bit elements)");
        chk(b_row == 11'(200 + (o * IN + i) / 4), "B row (8-bit weights)");
        chk(p_en == (i == 0), "Psum read on first beat only");
        chk(p_row == 11'(300 + o), "Psum row");
        beats++;
      end
      if (beat_valid && beat_tag.last) lasts++;
    end
    chk(cfg_reads == 1, "one context read");
    chk(beats == IN * OUT / 8, "beat count");
    chk(lasts == OUT / 8, "last flags");
    chk(ctx == c && sel_r == 2'd3 && w16, "context loaded");
    chk(cyc >= beats + 3 && cyc <= beats + 2 * NLANES + 20, "time to done");
    @(negedge clk);
    chk(!busy, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
