// tb_dpeu: checks the dual PE unit in its three uses: 16-bit x 8-bit MAC
// (Equation 3.2 split over the two PEs, with bias and shift), 2-D squared
// distance of two 8-bit features, and two independent 8-bit MACs; also the
// three-cycle latency from the last beat.
module tb_dpeu;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, w16;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [1:0] en = 2'b11, zero_skip;
  dp_e dp; op_e opcode = OP_ADD;
  logic [4:0] shift;
  lane_in_t in [2];
  lane_out_t out [2];
  dpeu dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(bit wide, dp_e d, int n);
    longint e0 = 0, e1 = 0;
    int t_last;
    logic [31:0] bias0 = $urandom_range(0, 5000), bias1 = $urandom_range(0, 5000);
    w16 = wide; dp = d; shift = (d == DP_SED) ? 5'd0 : 5'($urandom_range(0, 4));
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int l = 0; l < 2; l++) begin
        in[l].valid = 1; in[l].tag = '{first: i == 0, last: i == n - 1, pool_first: 1'b1, pool_last: 1'b1};
        in[l].a = 16'($urandom()); in[l].b = 16'($urandom());
        in[l].psum = l == 0 ? bias0 : bias1;
      end
      if (wide && d == DP_MAC)
        e0 = (i == 0 ? longint'(bias0) : e0) + longint'($signed(in[0].a)) * longint'($signed(in[0].b[7:0]));
      else if (wide && d == DP_SED)
        e0 = (i == 0 ? 0 : e0) + (int'(in[0].a[15:8]) - int'(in[0].b[15:8])) ** 2 +
                                 (int'(in[0].a[7:0]) - int'(in[0].b[7:0])) ** 2;
      else begin
        e0 = (i == 0 ? longint'(bias0) : e0) + longint'($signed(in[0].a[7:0])) * longint'($signed(in[0].b[7:0]));
        e1 = (i == 0 ? longint'(bias1) : e1) + longint'($signed(in[1].a[7:0])) * longint'($signed(in[1].b[7:0]));
      end
    end
    t_last = cyc;
    @(negedge clk);
    in[0].valid = 0; in[1].valid = 0;
    while (!out[0].valid && cyc < t_last + 10) @(negedge clk);
    checks++;
    if (cyc - t_last != 3) begin failures++; $display("FAIL latency %0d", cyc - t_last); end
    checks++;
    if (out[0].data !== 32'(longint'(int'(e0)) >>> shift)) begin
      failures++; $display("FAIL w16=%0d dp=%0d lane0 %h exp %h", wide, d, out[0].data, 32'(e0 >>> shift));
    end
    if (!wide) begin
      checks++;
      if (!out[1].valid || out[1].data !== 32'(longint'(int'(e1)) >>> shift)) begin
        failures++; $display("FAIL lane1 %h", out[1].data);
      end
    end
  endtask
  initial begin
    in[0] = '0; in[1] = '0; w16 = 0; dp = DP_MAC; shift = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) run(1, DP_MAC, $urandom_range(1, 12));
    for (int k = 0; k < 40; k++) run(1, DP_SED, 1);
    for (int k = 0; k < 40; k++) run(0, DP_MAC, $urandom_range(1, 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
