// tb_ndpu: drives the NDPU with memory rows and beat flags as the controller
// and crossbar would, for 8-bit systolic MAC with ReLU (sets of 2^assoc PEs
// sharing their leader's A), and checks the single row written back per
// accumulation: every lane's dot product plus bias, clamped at zero, at the
// output base row, and the latency from the last beat to the write.
module tb_ndpu;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  ctx_t ctx;
  dp_e dp = DP_MAC; op_e opcode = OP_ADD;
  logic w16 = 0, b16 = 0, beat_valid = 0;
  tag_t beat_tag;
  logic [1:0] a_sub, b_sub;
  logic [CFG_W-1:0] a_data, b_data, p_data;
  mreq_t res_wr;
  logic [NLANES-1:0] zero_skip, pool_update, relu_clamp;
  ndpu dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ctx = '0; ctx.pe_en = 16'hffff; ctx.sys_en = 1; ctx.relu_en = 1; ctx.addr_psum_start = 11'd77;
    beat_tag = '0; a_sub = 0; b_sub = 0; a_data = '0; b_data = '0; p_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      automatic int n = $urandom_range(1, 12);
      automatic int set;
      longint e [NLANES];
      int t_last, t_wr;
      ctx.assoc = 3'(k % 5); set = 1 << ctx.assoc;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        beat_valid = 1; beat_tag = '{first: i == 0, last: i == n - 1, pool_first: 1'b1, pool_last: 1'b1};
        a_sub = 2'($urandom()); b_sub = 2'($urandom());
        for (int w = 0; w < 16; w++) begin
          a_data[32*w +: 32] = $urandom(); b_data[32*w +: 32] = $urandom();
          p_data[32*w +: 32] = 32'($urandom_range(0, 4000) - 2000);
        end
        for (int l = 0; l < NLANES; l++) begin
          automatic int lead = l - (l % set);
          automatic logic [7:0] av = 8'(a_data[32*lead +: 32] >> (8 * a_sub));
          automatic logic [7:0] bv = 8'(b_data[32*l +: 32] >> (8 * b_sub));
          e[l] = (i == 0 ? longint'($signed(p_data[32*l +: 32])) : e[l]) + longint'($signed(av)) * longint'($signed(bv));
        end
      end
      t_last = cyc;
      @(negedge clk); beat_valid = 0;
      while (!res_wr.en && cyc < t_last + 40) @(negedge clk);
      t_wr = cyc - t_last;
      checks++;
      // 1 input buffer + 3 PE array + 1 output registers + set-1 alignment + 1 write register
      if (t_wr != 1 + 3 + 1 + set - 1 + 1) begin failures++; $display("FAIL latency %0d set %0d", t_wr, set); end
      checks++;
      if (res_wr.row != 11'd77 || res_wr.lane_we != 16'hffff) begin failures++; $display("FAIL row/mask"); end
      for (int l = 0; l < NLANES; l++) begin
        automatic longint r = e[l] < 0 ? 0 : e[l];
        checks++;
        if (res_wr.wdata[32*l +: 32] != 32'(r)) begin
          failures++; $display("FAIL set %0d lane %0d got %h exp %h", set, l, res_wr.wdata[32*l +: 32], 32'(r));
        end
      end
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
