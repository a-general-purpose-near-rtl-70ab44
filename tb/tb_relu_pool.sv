// tb_relu_pool: random pooling windows of 1 to 5 results per lane, with and
// without ReLU; each window must release its maximum (after ReLU) one cycle
// after its last result, and nothing otherwise.
module tb_relu_pool;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, relu_en;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  lane_out_t in [NLANES], out [NLANES];
  logic [NLANES-1:0] pool_update, relu_clamp;
  relu_pool dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int remain [NLANES];
    int mx [NLANES];
    bit due [NLANES];
    int exp_v [NLANES];
    for (int l = 0; l < NLANES; l++) begin in[l] = '0; remain[l] = 0; due[l] = 0; end
    relu_en = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 500 == 0) relu_en = ~relu_en;
      // check the outputs for the previous cycle
      for (int l = 0; l < NLANES; l++) begin
        checks++;
        if (out[l].valid != due[l] || (due[l] && $signed(out[l].data) != exp_v[l])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d lane %0d got %0d exp %0d", t, l, $signed(out[l].data), exp_v[l]);
        end
        due[l] = 0;
      end
      for (int l = 0; l < NLANES; l++) begin
        automatic int v;
        in[l].valid = 1'($urandom_range(0, 3) != 0);
        if (!in[l].valid) continue;
        in[l].pool_first = (remain[l] == 0);
        if (remain[l] == 0) remain[l] = $urandom_range(1, 5);
        in[l].data = 32'($urandom_range(0, 2000) - 1000);
        v = $signed(in[l].data);
        if (relu_en && v < 0) v = 0;
        mx[l] = in[l].pool_first ? v : (v > mx[l] ? v : mx[l]);
        remain[l]--;
        in[l].pool_last = (remain[l] == 0);
        if (in[l].pool_last) begin due[l] = 1; exp_v[l] = mx[l]; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
