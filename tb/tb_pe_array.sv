// tb_pe_array: sixteen independent 8-bit MAC streams, one per lane, with a few
// PEs disabled; every enabled lane must deliver its own dot product plus bias
// three cycles after the last beat, and disabled lanes nothing. A second pass in
// 16-bit mode checks that DPEU k answers on lane 2k.
module tb_pe_array;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, w16 = 0;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [NLANES-1:0] pe_en, zero_skip;
  dp_e dp = DP_MAC; op_e opcode = OP_ADD;
  logic [4:0] shift = 0;
  lane_in_t in [NLANES];
  lane_out_t out [NLANES];
  pe_array dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(bit wide, int n);
    longint e [NLANES];
    w16 = wide;
    pe_en = wide ? 16'hffff : 16'($urandom()) | 16'h0001;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int l = 0; l < NLANES; l++) begin
        in[l].valid = 1; in[l].tag = '{first: i == 0, last: i == n - 1, pool_first: 1'b1, pool_last: 1'b1};
        in[l].a = 16'($urandom()); in[l].b = 16'($urandom()); in[l].psum = 32'(l * 3);
        if (wide) e[l] = (i == 0 ? l * 3 : e[l]) + longint'($signed(in[l].a)) * longint'($signed(in[l].b[7:0]));
        else      e[l] = (i == 0 ? l * 3 : e[l]) + longint'($signed(in[l].a[7:0])) * longint'($signed(in[l].b[7:0]));
      end
    end
    @(negedge clk);
    for (int l = 0; l < NLANES; l++) in[l].valid = 0;
    @(negedge clk);
    @(negedge clk);
    for (int l = 0; l < NLANES; l++) begin
      automatic bit act = wide ? (l % 2 == 0) : pe_en[l];
      checks++;
      if (out[l].valid != act || (act && out[l].data !== 32'(e[l]))) begin
        failures++;
        $display("FAIL w16=%0d lane %0d v=%b got %h exp %h", wide, l, out[l].valid, out[l].data, 32'(e[l]));
      end
    end
  endtask
  initial begin
    for (int l = 0; l < NLANES; l++) in[l] = '0;
    pe_en = '1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) run(k % 2 == 1, $urandom_range(1, 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
