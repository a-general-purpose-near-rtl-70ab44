// tb_crossbar: random port-to-memory assignments (all four ports on different
// memories): each memory must receive the request of the port that selects it,
// read ports must get the row of their memory one cycle later, the context read
// must reach MEM3, and two ports on one memory must raise conflict.
module tb_crossbar;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [1:0] sel_a, sel_b, sel_p, sel_r;
  logic cfg_rd = 0, a_en = 0, b_en = 0, p_en = 0, conflict;
  logic [ROW_W-1:0] cfg_addr = 0, a_row, b_row, p_row;
  mreq_t res_wr = '0;
  mreq_t mem_req [NMEM];
  logic [CFG_W-1:0] mem_rdata [NMEM];
  logic [CFG_W-1:0] a_data, b_data, p_data, cfg_data;
  crossbar dut (.*);
  int checks = 0, failures = 0, conflicts_seen = 0;
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
    logic [1:0] perm [4];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      perm = '{2'd0, 2'd1, 2'd2, 2'd3};
      perm.shuffle();
      @(negedge clk);
      {sel_a, sel_b, sel_p, sel_r} = {perm[0], perm[1], perm[2], perm[3]};
      a_en = 1; b_en = 1; p_en = 1'($urandom_range(0, 1));
      a_row = ROW_W'($urandom()); b_row = ROW_W'($urandom()); p_row = ROW_W'($urandom());
      res_wr = '0; res_wr.en = 1; res_wr.we = 1; res_wr.row = ROW_W'($urandom()); res_wr.lane_we = 16'hffff;
      #1;
      chk(mem_req[sel_a].en && !mem_req[sel_a].we && mem_req[sel_a].row == a_row, "A request");
      chk(mem_req[sel_b].en && mem_req[sel_b].row == b_row, "B request");
      chk(mem_req[sel_p].en == p_en, "Psum request only when enabled");
      chk(mem_req[sel_r].we && mem_req[sel_r].row == res_wr.row, "Result write");
      chk(!conflict, "no conflict");
      @(negedge clk);
      for (int m = 0; m < NMEM; m++) mem_rdata[m] = {16{32'(m * 1000 + k)}};
      a_en = 0; b_en = 0; p_en = 0; res_wr.en = 0;
      #1;
      chk(a_data == mem_rdata[perm[0]] && b_data == mem_rdata[perm[1]] && p_data == mem_rdata[perm[2]], "read data routing");
    end
    // context read of MEM3
    @(negedge clk); cfg_rd = 1; cfg_addr = 11'd7;
    #1 chk(mem_req[3].en && mem_req[3].row == 11'd7 && !mem_req[3].we, "context read");
    @(negedge clk); cfg_rd = 0;
    chk(cfg_data == mem_rdata[3], "context data");
    // conflict
    @(negedge clk); sel_a = 2'd1; sel_b = 2'd1; a_en = 1; b_en = 1;
    #1 if (conflict) conflicts_seen++;
    chk(conflicts_seen == 1, "conflict flagged");
    rst_n = 0;
    @(negedge clk); a_en = 0; b_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
