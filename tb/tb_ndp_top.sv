// tb_ndp_top: end-to-end test of the near data processor at default size.
//
// Acts as the microcontroller: it writes operands and a context row into the L2
// through the 32-bit port, pulses ndp_en, waits for ndp_done, reads the results
// back and compares them with values computed here. Operations, in order:
//   1. FC layer, 16-bit inputs x 8-bit weights, eight DPEUs in one systolic set,
//      two passes of eight output neurons, with bias, shift and zero operands;
//   2. CONV_POOL, 8-bit, 3x3 kernel over a 6x6x2 ifmap, ReLU and 2x2/2 max-pool,
//      four systolic sets of four PEs, each set on its own image (batch of 4);
//   3. CONV without pooling, 8-bit, stride 2, independent PEs;
//   4. GP distance calculation (K-means), 16-bit points of two 8-bit features
//      against four centroids, eight DPEUs;
//   5. GP bit operation (XOR), 8-bit, sixteen independent PEs.
// Each run's cycle count is checked against one beat per cycle. Mechanisms
// (systolic and independent flow, 8- and 16-bit modes, zero gating, ReLU clamp,
// max-pool update, MCU held off while busy, each mode) are counted, and one
// that never happened counts as a failure.
module tb_ndp_top;
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

  int checks = 0, failures = 0;
  int n_zero = 0, n_pool = 0, n_relu = 0, n_conflict = 0, n_denied = 0;
  int n_sys = 0, n_ind = 0, n_w16 = 0, n_w8 = 0;
  int n_mode [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    n_zero     += $countones(evt_zero_skip);
    n_pool     += $countones(evt_pool_update);
    n_relu     += $countones(evt_relu_clamp);
    n_conflict += int'(evt_conflict && rst_n);
  end

  initial begin
    repeat (200000) @(posedge clk);
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
      $display("FAIL %s mem%0d row%0d lane%0d got %h exp %h", what, m, row, lane, d, exp);
    end
  endtask

  function automatic int asr(longint v, int s);
    return int'(longint'(int'(v)) >>> s);
  endfunction

  // ---------------- 1. FC ----------------
  task automatic test_fc();
    ctx_t c = '0;
    localparam int IN = 20, OUT = 16, SH = 2;
    int a_v [IN];
    int w [OUT][IN];
    int bias [OUT];
    c.mode = MODE_FC; c.sys_en = 1; c.assoc = 3; c.pe_en = 16'hffff;
    c.data_width = 1; c.datapath = DP_MAC; c.shift_param = SH;
    c.xbar_config = {2'd3, 2'd2, 2'd1, 2'd0};   // res=3 psum=2 b=1 a=0
    c.addr_a_start = 10; c.addr_b_start = 20; c.addr_psum_start = 30;
    c.in_len = IN - 1; c.out_len = OUT - 1;
    for (int e = 0; e < IN; e++) begin
      a_v[e] = (e % 5 == 3) ? 0 : $signed(16'($urandom()));
      put_half(0, 10 + e / 2, 0, e % 2, 16'(a_v[e]));
    end
    for (int n = 0; n < OUT; n++) begin
      int p = n / 8, k = n % 8;
      for (int e = 0; e < IN; e++) begin
        int off = p * IN + e;
        w[n][e] = (e % 7 == 6) ? 0 : $signed(8'($urandom()));
        put_byte(1, 20 + off / 4, 2 * k, off % 4, 8'(w[n][e]));
      end
      bias[n] = $urandom_range(0, 2000) - 1000;
      put_word(2, 30 + p, 2 * k, 32'(bias[n]));
    end
    run(c, IN * 2);
    for (int n = 0; n < OUT; n++) begin
      longint s = bias[n];
      for (int e = 0; e < IN; e++) s += longint'(a_v[e]) * w[n][e];
      expect_word(3, 30 + n / 8, 2 * (n % 8), 32'(asr(s, SH)), "FC");
    end
  endtask

  // ---------------- 2. CONV_POOL ----------------
  task automatic test_conv_pool();
    ctx_t c = '0;
    localparam int H = 6, W = 6, CI = 2, K = 3, SH = 1;
    int img [4][H][W][CI];
    int ker [4][K][K][CI];
    int bias [4];
    int conv [4][4][4][4];   // [image][channel][orow][ocol]
    c.mode = MODE_CONV_POOL; c.sys_en = 1; c.assoc = 2; c.pe_en = 16'hffff;
    c.data_width = 0; c.datapath = DP_MAC; c.shift_param = SH; c.relu_en = 1;
    c.xbar_config = {2'd3, 2'd1, 2'd0, 2'd2};   // res=3 psum=1 b=0 a=2
    c.addr_a_start = 40; c.addr_b_start = 50; c.addr_psum_start = 60;
    c.chi = CI - 1; c.cho = 4 - 1; c.row_size = H - 1; c.column_size = W - 1;
    c.kernel_size = K - 1; c.stride = 0;
    c.pool_row_size = 4 - 1; c.pool_col_size = 4 - 1; c.pool_kernel = 1; c.pool_stride = 1;
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < H; r++)
        for (int q = 0; q < W; q++)
          for (int ch = 0; ch < CI; ch++) begin
            int off = (r * W + q) * CI + ch;
            img[s][r][q][ch] = $signed(8'($urandom_range(0, 255)));
            if ($urandom_range(0, 9) == 0) img[s][r][q][ch] = 0;
            put_byte(2, 40 + off / 4, 4 * s, off % 4, 8'(img[s][r][q][ch]));
          end
    for (int f = 0; f < 4; f++) begin
      for (int ii = 0; ii < K; ii++)
        for (int jj = 0; jj < K; jj++)
          for (int ch = 0; ch < CI; ch++) begin
            int off = (ii * K + jj) * CI + ch;
            ker[f][ii][jj][ch] = $signed(8'($urandom()));
            for (int s = 0; s < 4; s++) put_byte(0, 50 + off / 4, 4 * s + f, off % 4, 8'(ker[f][ii][jj][ch]));
          end
      bias[f] = $urandom_range(0, 4000) - 2000;
      for (int s = 0; s < 4; s++) put_word(1, 60, 4 * s + f, 32'(bias[f]));
    end
    run(c, 16 * K * K * CI);
    for (int s = 0; s < 4; s++)
      for (int f = 0; f < 4; f++)
        for (int orow = 0; orow < 4; orow++)
          for (int ocol = 0; ocol < 4; ocol++) begin
            longint acc = bias[f];
            for (int ii = 0; ii < K; ii++)
              for (int jj = 0; jj < K; jj++)
                for (int ch = 0; ch < CI; ch++)
                  acc += longint'(img[s][orow + ii][ocol + jj][ch]) * ker[f][ii][jj][ch];
            conv[s][f][orow][ocol] = asr(acc, SH);
            if (conv[s][f][orow][ocol] < 0) conv[s][f][orow][ocol] = 0;
          end
    for (int pr = 0; pr < 2; pr++)
      for (int pc = 0; pc < 2; pc++)
        for (int s = 0; s < 4; s++)
          for (int f = 0; f < 4; f++) begin
            int m = 0;
            for (int i = 0; i < 2; i++)
              for (int j = 0; j < 2; j++)
                if (conv[s][f][2 * pr + i][2 * pc + j] > m) m = conv[s][f][2 * pr + i][2 * pc + j];
            expect_word(3, 60 + pr * 2 + pc, 4 * s + f, 32'(m), "CONV_POOL");
          end
  endtask

  // ---------------- 3. CONV, stride 2, independent ----------------
  task automatic test_conv();
    ctx_t c = '0;
    localparam int H = 4, W = 4, K = 2;
    int img [NLANES][H][W];
    int ker [NLANES][K][K];
    int bias [NLANES];
    c.mode = MODE_CONV; c.sys_en = 0; c.assoc = 0; c.pe_en = 16'hffff;
    c.data_width = 0; c.datapath = DP_MAC; c.shift_param = 0; c.relu_en = 0;
    c.xbar_config = {2'd2, 2'd3, 2'd1, 2'd0};   // res=2 psum=3 b=1 a=0
    c.addr_a_start = 100; c.addr_b_start = 110; c.addr_psum_start = 120;
    c.chi = 0; c.cho = 0; c.row_size = H - 1; c.column_size = W - 1;
    c.kernel_size = K - 1; c.stride = 1;
    c.pool_row_size = 2 - 1; c.pool_col_size = 2 - 1;
    for (int l = 0; l < NLANES; l++) begin
      for (int r = 0; r < H; r++)
        for (int q = 0; q < W; q++) begin
          img[l][r][q] = $signed(8'($urandom()));
          put_byte(0, 100 + (r * W + q) / 4, l, (r * W + q) % 4, 8'(img[l][r][q]));
        end
      for (int ii = 0; ii < K; ii++)
        for (int jj = 0; jj < K; jj++) begin
          ker[l][ii][jj] = $signed(8'($urandom()));
          put_byte(1, 110, l, ii * K + jj, 8'(ker[l][ii][jj]));
        end
      bias[l] = $urandom_range(0, 200) - 100;
      put_word(3, 120, l, 32'(bias[l]));
    end
    run(c, 4 * K * K);
    for (int orow = 0; orow < 2; orow++)
      for (int ocol = 0; ocol < 2; ocol++)
        for (int l = 0; l < NLANES; l++) begin
          longint acc = bias[l];
          for (int ii = 0; ii < K; ii++)
            for (int jj = 0; jj < K; jj++)
              acc += longint'(img[l][2 * orow + ii][2 * ocol + jj]) * ker[l][ii][jj];
          expect_word(2, 120 + orow * 2 + ocol, l, 32'(int'(acc)), "CONV");
        end
  endtask

  // ---------------- 4. GP distance (K-means) ----------------
  task automatic test_kmeans();
    ctx_t c = '0;
    localparam int NP = 16, NC = 4;
    logic [15:0] pts [NDPEU][NP];
    logic [15:0] cen [NC];
    c.mode = MODE_GP; c.sys_en = 0; c.assoc = 0; c.pe_en = 16'hffff;
    c.data_width = 1; c.datapath = DP_SED; c.shift_param = 0;
    c.xbar_config = {2'd1, 2'd2, 2'd3, 2'd0};   // res=1 psum=2 b=3 a=0
    c.addr_a_start = 200; c.addr_b_start = 210; c.addr_psum_start = 300;
    c.loop_a = 0; c.len_a = NP - 1; c.loop_b = NP - 1; c.len_b = NC - 1;
    for (int k = 0; k < NDPEU; k++)
      for (int p = 0; p < NP; p++) begin
        pts[k][p] = 16'($urandom());
        put_half(0, 200 + p / 2, 2 * k, p % 2, pts[k][p]);
      end
    for (int q = 0; q < NC; q++) begin
      cen[q] = 16'($urandom());
      for (int k = 0; k < NDPEU; k++) put_half(3, 210 + q / 2, 2 * k, q % 2, cen[q]);
    end
    run(c, NP * NC);
    for (int t = 0; t < NP * NC; t++)
      for (int k = 0; k < NDPEU; k++) begin
        int p = t % NP, q = t / NP;
        int d1 = int'(pts[k][p][15:8]) - int'(cen[q][15:8]);
        int d0 = int'(pts[k][p][7:0]) - int'(cen[q][7:0]);
        expect_word(1, 300 + t, 2 * k, 32'(d1 * d1 + d0 * d0), "SED");
      end
  endtask

  // ---------------- 5. GP XOR ----------------
  task automatic test_xor();
    ctx_t c = '0;
    localparam int N = 8;
    logic [7:0] av [NLANES][N], bv [NLANES][N];
    c.mode = MODE_GP; c.sys_en = 0; c.assoc = 0; c.pe_en = 16'hffff;
    c.data_width = 0; c.datapath = DP_ALU; c.opcode = OP_XOR;
    c.xbar_config = {2'd3, 2'd0, 2'd2, 2'd1};   // res=3 psum=0 b=2 a=1
    c.addr_a_start = 400; c.addr_b_start = 410; c.addr_psum_start = 420;
    c.loop_a = 0; c.len_a = N - 1; c.loop_b = 0; c.len_b = N - 1;
    for (int l = 0; l < NLANES; l++)
      for (int e = 0; e < N; e++) begin
        av[l][e] = 8'($urandom()); bv[l][e] = 8'($urandom());
        put_byte(1, 400 + e / 4, l, e % 4, av[l][e]);
        put_byte(2, 410 + e / 4, l, e % 4, bv[l][e]);
      end
    run(c, N);
    for (int e = 0; e < N; e++)
      for (int l = 0; l < NLANES; l++)
        expect_word(3, 420 + e, l, 32'(signed'(av[l][e] ^ bv[l][e])), "XOR");
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("mechanism %-22s seen %0d times", what, n);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    test_fc();
    test_conv_pool();
    test_conv();
    test_kmeans();
    test_xor();
    need(n_mode[MODE_FC], "FC mode");
    need(n_mode[MODE_CONV_POOL], "CONV_POOL mode");
    need(n_mode[MODE_CONV], "CONV mode");
    need(n_mode[MODE_GP], "GP mode");
    need(n_sys, "systolic flow");
    need(n_ind, "independent flow");
    need(n_w16, "16-bit DPEU mode");
    need(n_w8, "8-bit PE mode");
    need(n_zero, "zero clock gating");
    need(n_relu, "ReLU clamp");
    need(n_pool, "max-pool update");
    need(n_denied, "MCU held off");
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL crossbar conflicts %0d", n_conflict); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
