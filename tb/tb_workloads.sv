// tb_workloads: the evaluated workloads at their real sizes on the default design.
//
// Plays the microcontroller as tb_ndp_top does (writes operands and the context
// through the 32-bit port, pulses ndp_en, waits for ndp_done, reads back) and
// runs, with random data and a reference model in the testbench:
//   1. LeNet-5 CONV1: 3x32x32 8-bit images, six 5x5 filters, ReLU, 2x2/2
//      max-pool, two images at once in two systolic sets of eight PEs (six of
//      each set enabled, twelve PEs in all): 58,800 beats;
//   2. LeNet-5 CONV2: 6x14x14 16-bit ifmap, sixteen 5x5 filters of 8 bit,
//      ReLU, 2x2/2 max-pool, one systolic set of eight DPEUs, two channel
//      passes: 30,000 beats;
//   3. LeNet-5 FC1 (400->120), FC2 (120->84) and FC3 (84->10), 16-bit inputs,
//      8-bit weights, eight DPEUs in one systolic set;
//   4. K-means distance step: 1024 two-dimensional points of two 8-bit features
//      against 8 centroids, 128 points per DPEU: 1,024 beats.
// Each run must take exactly one beat per cycle plus the fixed 49-cycle
// overhead, so the cycle counts equal the beat counts given above. Layer shapes
// are those of LeNet-5 and of the K-means evaluation; the data are random.
module tb_workloads;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;

  logic        mcu_req = 0, mcu_we = 0, mcu_gnt, mcu_rvalid;
  logic [3:0]  mcu_be = 4'hf;
  logic [16:0] mcu_addr = '0;
  logic [31:0] mcu_wdata = '0, mcu_rdata;
  logic        ndp_en = 0, ndp_busy, ndp_done, evt_conflict;
  logic [NLANES-1:0] evt_zero_skip, evt_pool_update, evt_relu_clamp;

  ndp_top dut (.*);

  int checks = 0, failures = 0, n_denied = 0, n_conflict = 0;
  int n_sys = 0, n_ind = 0, n_w16 = 0, n_w8 = 0;
  int n_mode [4] = '{0, 0, 0, 0};

  int fail_by [string];
  always @(posedge clk) n_conflict += int'(evt_conflict && rst_n);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [16:0] waddr(int m, int row, int lane);
    return 17'((m << 15) | (row << 4) | lane);
  endfunction

  task automatic mcu_write(logic [16:0] a, logic [31:0] d);
    @(negedge clk);
    mcu_req = 1; mcu_we = 1; mcu_addr = a; mcu_wdata = d;
    @(negedge clk);
    mcu_req = 0; mcu_we = 0;
  endtask

  task automatic mcu_read(logic [16:0] a, output logic [31:0] d);
    @(negedge clk);
    mcu_req = 1; mcu_we = 0; mcu_addr = a;
    @(negedge clk);
    mcu_req = 0;
    d = mcu_rdata;
  endtask

  // shadow copy of what has been written, so sub-word writes keep neighbours
  logic [31:0] shadow [int];
  task automatic put_byte(int m, int row, int lane, int idx, logic [7:0] v);
    logic [16:0] a = waddr(m, row, lane);
    logic [31:0] w = shadow.exists(a) ? shadow[a] : 32'd0;
    w[8*idx +: 8] = v;
    shadow[a] = w;
    mcu_write(a, w);
  endtask
  task automatic put_half(int m, int row, int lane, int idx, logic [15:0] v);
    put_byte(m, row, lane, 2*idx, v[7:0]);
    put_byte(m, row, lane, 2*idx + 1, v[15:8]);
  endtask
  task automatic put_word(int m, int row, int lane, logic [31:0] v);
    shadow[waddr(m, row, lane)] = v;
    mcu_write(waddr(m, row, lane), v);
  endtask

  task automatic run(ctx_t c, int beats);
    int t0, t1;
    logic [31:0] d;
    for (int l = 0; l < NLANES; l++) put_word(3, 0, l, c[32*l +: 32]);
    @(negedge clk); ndp_en = 1;
    @(negedge clk); ndp_en = 0;
    t0 = $time / 10;
    // the MCU must be held off while the NDP runs
    @(negedge clk); mcu_req = 1; mcu_we = 0; mcu_addr = waddr(0, 0, 0);
    #1; if (ndp_busy && !mcu_gnt) n_denied++;
    @(negedge clk); mcu_req = 0;
    while (!ndp_done) @(posedge clk);
    t1 = $time / 10;
    // one beat per cycle: config and context load (3) + beats + drain
    // (2*16+12+1) + done (1) = beats + 49
    checks++;
    if (t1 - t0 != beats + 2 * NLANES + 17) begin
      failures++;
      $display("FAIL cycle count %0d for %0d beats", t1 - t0, beats);
    end
    $display("run mode=%0d beats=%0d cycles=%0d", c.mode, beats, t1 - t0);
    n_mode[c.mode]++;
    if (c.sys_en) n_sys++; else n_ind++;
    if (c.data_width) n_w16++; else n_w8++;
    mcu_read(waddr(0, 0, 0), d);
  endtask

  task automatic expect_word(int m, int row, int lane, logic [31:0] exp, string what);
    logic [31:0] d;
    mcu_read(waddr(m, row, lane), d);
    checks++;
    if (d !== exp) begin
      failures++;
      fail_by[what]++;
      if (fail_by[what] <= 8)
        $display("FAIL %s mem%0d row%0d lane%0d got %h exp %h", what, m, row, lane, d, exp);
    end
  endtask

  function automatic int asr(longint v, int s);
    return int'(longint'(int'(v)) >>> s);
  endfunction

  // ---------------- CONV_POOL layer (8-bit or 16-bit ifmap) ----------------
  // nset sets of 2^assoc units, one image per set; ncho filters; lane of unit u
  // is u (8-bit) or 2u (16-bit). Results: one row per pooling window and pass.
  task automatic conv_layer(string name, bit w16, int H, int CI, int K, int ncho,
                            int assoc, int nset, logic [15:0] pe_en, int SH);
    ctx_t c = '0;
    int O = H - K + 1, P = O / 2, set = 1 << assoc, npass = (ncho + set - 1) / set;
    int step = w16 ? 2 : 1;
    int img [][][][];
    int ker [][][][];
    int bias [];
    img = new[nset];
    foreach (img[s]) begin
      img[s] = new[H];
      foreach (img[s][r]) begin
        img[s][r] = new[H];
        foreach (img[s][r][q]) img[s][r][q] = new[CI];
      end
    end
    ker = new[ncho];
    foreach (ker[f]) begin
      ker[f] = new[K];
      foreach (ker[f][i]) begin
        ker[f][i] = new[K];
        foreach (ker[f][i][j]) ker[f][i][j] = new[CI];
      end
    end
    bias = new[ncho];
    c.mode = MODE_CONV_POOL; c.sys_en = 1; c.assoc = 3'(assoc); c.pe_en = pe_en;
    c.data_width = w16; c.datapath = DP_MAC; c.shift_param = 5'(SH); c.relu_en = 1;
    c.xbar_config = {2'd3, 2'd1, 2'd0, 2'd2};   // res=3 psum=1 b=0 a=2
    c.addr_a_start = 0; c.addr_b_start = 0; c.addr_psum_start = 1000;
    c.chi = 8'(CI - 1); c.cho = 8'(ncho - 1); c.row_size = 8'(H - 1); c.column_size = 8'(H - 1);
    c.kernel_size = 4'(K - 1); c.stride = 0;
    c.pool_row_size = 8'(O - 1); c.pool_col_size = 8'(O - 1); c.pool_kernel = 1; c.pool_stride = 1;
    for (int s = 0; s < nset; s++)
      for (int r = 0; r < H; r++)
        for (int q = 0; q < H; q++)
          for (int ch = 0; ch < CI; ch++) begin
            int off = (r * H + q) * CI + ch;
            int lane = step * set * s;
            if (w16) begin
              img[s][r][q][ch] = $urandom_range(0, 4095) - 2048;
              if ($urandom_range(0, 3) == 0) img[s][r][q][ch] = 0;
              put_half(2, off / 2, lane, off % 2, 16'(img[s][r][q][ch]));
            end else begin
              img[s][r][q][ch] = $urandom_range(0, 255) - 128;
              if ($urandom_range(0, 3) == 0) img[s][r][q][ch] = 0;
              put_byte(2, off / 4, lane, off % 4, 8'(img[s][r][q][ch]));
            end
          end
    for (int f = 0; f < ncho; f++) begin
      int p = f / set, u = f % set;
      for (int ii = 0; ii < K; ii++)
        for (int jj = 0; jj < K; jj++)
          for (int ch = 0; ch < CI; ch++) begin
            int off = p * K * K * CI + (ii * K + jj) * CI + ch;
            ker[f][ii][jj][ch] = $urandom_range(0, 255) - 128;
            for (int s = 0; s < nset; s++)
              put_byte(0, off / 4, step * (set * s + u), off % 4, 8'(ker[f][ii][jj][ch]));
          end
      bias[f] = $urandom_range(0, 4000) - 2000;
      for (int s = 0; s < nset; s++) put_word(1, 1000 + p, step * (set * s + u), 32'(bias[f]));
    end
    run(c, npass * P * P * 4 * K * K * CI);
    for (int s = 0; s < nset; s++)
      for (int f = 0; f < ncho; f++)
        for (int pr = 0; pr < P; pr++)
          for (int pc = 0; pc < P; pc++) begin
            int m = 0;
            for (int i = 0; i < 2; i++)
              for (int j = 0; j < 2; j++) begin
                longint acc = bias[f];
                int v;
                for (int ii = 0; ii < K; ii++)
                  for (int jj = 0; jj < K; jj++)
                    for (int ch = 0; ch < CI; ch++)
                      acc += longint'(img[s][2 * pr + i + ii][2 * pc + j + jj][ch]) * ker[f][ii][jj][ch];
                v = asr(acc, SH);
                if (v > m) m = v;
              end
            expect_word(3, 1000 + (f / set) * P * P + pr * P + pc,
                        step * (set * s + f % set), 32'(m), name);
          end
  endtask

  // ---------------- FC layer, 16-bit inputs, eight DPEUs ----------------
  task automatic fc_layer(string name, int IN, int OUT, int SH);
    ctx_t c = '0;
    int npass = (OUT + 7) / 8;
    int a_v [];
    int w [][];
    int bias [];
    a_v = new[IN];
    w = new[OUT];
    foreach (w[n]) w[n] = new[IN];
    bias = new[OUT];
    c.mode = MODE_FC; c.sys_en = 1; c.assoc = 3; c.pe_en = 16'hffff;
    c.data_width = 1; c.datapath = DP_MAC; c.shift_param = 5'(SH);
    c.xbar_config = {2'd3, 2'd2, 2'd1, 2'd0};   // res=3 psum=2 b=1 a=0
    c.addr_a_start = 0; c.addr_b_start = 0; c.addr_psum_start = 1900;
    c.in_len = 12'(IN - 1); c.out_len = 12'(OUT - 1);
    for (int e = 0; e < IN; e++) begin
      a_v[e] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, 4095) - 2048;
      put_half(0, e / 2, 0, e % 2, 16'(a_v[e]));
    end
    for (int n = 0; n < OUT; n++) begin
      int p = n / 8, k = n % 8;
      for (int e = 0; e < IN; e++) begin
        int off = p * IN + e;
        w[n][e] = $urandom_range(0, 255) - 128;
        put_byte(1, off / 4, 2 * k, off % 4, 8'(w[n][e]));
      end
      bias[n] = $urandom_range(0, 2000) - 1000;
      put_word(2, 1900 + p, 2 * k, 32'(bias[n]));
    end
    run(c, IN * npass);
    for (int n = 0; n < OUT; n++) begin
      longint s = bias[n];
      for (int e = 0; e < IN; e++) s += longint'(a_v[e]) * w[n][e];
      expect_word(3, 1900 + n / 8, 2 * (n % 8), 32'(asr(s, SH)), name);
    end
  endtask

  // ---------------- K-means distances ----------------
  task automatic kmeans(int NP, int NC);
    ctx_t c = '0;
    logic [15:0] pts [][];
    logic [15:0] cen [];
    pts = new[NDPEU];
    foreach (pts[k]) pts[k] = new[NP];
    cen = new[NC];
    c.mode = MODE_GP; c.sys_en = 0; c.assoc = 0; c.pe_en = 16'hffff;
    c.data_width = 1; c.datapath = DP_SED;
    c.xbar_config = {2'd1, 2'd2, 2'd3, 2'd0};   // res=1 psum=2 b=3 a=0
    c.addr_a_start = 0; c.addr_b_start = 100; c.addr_psum_start = 600;
    c.loop_a = 0; c.len_a = 12'(NP - 1); c.loop_b = 12'(NP - 1); c.len_b = 12'(NC - 1);
    for (int k = 0; k < NDPEU; k++)
      for (int p = 0; p < NP; p++) begin
        pts[k][p] = 16'($urandom());
        put_half(0, p / 2, 2 * k, p % 2, pts[k][p]);
      end
    for (int q = 0; q < NC; q++) begin
      cen[q] = 16'($urandom());
      for (int k = 0; k < NDPEU; k++) put_half(3, 100 + q / 2, 2 * k, q % 2, cen[q]);
    end
    run(c, NP * NC);
    for (int t = 0; t < NP * NC; t++)
      for (int k = 0; k < NDPEU; k++) begin
        int p = t % NP, q = t / NP;
        int d1 = int'(pts[k][p][15:8]) - int'(cen[q][15:8]);
        int d0 = int'(pts[k][p][7:0]) - int'(cen[q][7:0]);
        expect_word(1, 600 + t, 2 * k, 32'(d1 * d1 + d0 * d0), "K-means");
      end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    conv_layer("CONV1", 1'b0, 32, 3, 5, 6, 3, 2, 16'h3f3f, 8);
    conv_layer("CONV2", 1'b1, 14, 6, 5, 16, 3, 1, 16'hffff, 12);
    fc_layer("FC1", 400, 120, 12);
    fc_layer("FC2", 120, 84, 12);
    fc_layer("FC3", 84, 10, 12);
    kmeans(128, 8);
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL crossbar conflicts %0d", n_conflict); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
