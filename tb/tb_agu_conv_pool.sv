// tb_agu_conv_pool: runs the CONV/CONV_POOL address generator on random layer
// shapes (kernel, stride, channels, pooling window and step, channel passes)
// and compares every beat with a reference built from the nested loops of the
// address-generation algorithm; checks one beat per cycle and done.
module tb_agu_conv_pool;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, busy, done, pool;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [7:0] chi, cho, column_size, pool_row_size, pool_col_size;
  logic [3:0] kernel_size, pool_kernel;
  logic [2:0] stride, pool_stride, assoc;
  beat_t beat;
  agu_conv_pool dut (.*);
  int checks = 0, failures = 0;
  beat_t expq [$];
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      automatic int ci = $urandom_range(1, 3), co = $urandom_range(1, 6), k = $urandom_range(1, 3);
      automatic int s = $urandom_range(1, 2), pk = $urandom_range(1, 3), ps = $urandom_range(1, 2);
      automatic int as = $urandom_range(0, 2), w = $urandom_range(6, 9);
      automatic int orows = (w - k) / s + 1, ocols = orows;
      automatic int npass = (co + (1 << as) - 1) >> as;
      automatic bit p = (t % 3 != 0);
      if (!p) begin pk = 1; ps = 1; end
      if (pk > orows) pk = orows;   // a window must fit the conv output
      expq.delete();
      for (int pass = 0; pass < npass; pass++)
        for (int pr = 0; pr + pk <= orows; pr += ps)
          for (int pc = 0; pc + pk <= ocols; pc += ps)
            for (int i = 0; i < pk; i++)
              for (int j = 0; j < pk; j++)
                for (int ii = 0; ii < k; ii++)
                  for (int jj = 0; jj < k; jj++)
                    for (int kk = 0; kk < ci; kk++) begin
                      beat_t b;
                      b.valid = 1;
                      b.a_off = ELEM_W'((((pr + i) * s + ii) * w + (pc + j) * s + jj) * ci + kk);
                      b.b_off = ELEM_W'(pass * k * k * ci + (ii * k + jj) * ci + kk);
                      b.p_off = ROW_W'(pass);
                      b.first = (ii == 0 && jj == 0 && kk == 0);
                      b.last = (ii == k - 1 && jj == k - 1 && kk == ci - 1);
                      b.pool_first = (i == 0 && j == 0);
                      b.pool_last = (i == pk - 1 && j == pk - 1);
                      expq.push_back(b);
                    end
      pool = p; chi = 8'(ci - 1); cho = 8'(co - 1); column_size = 8'(w - 1);
      kernel_size = 4'(k - 1); stride = 3'(s - 1);
      pool_row_size = 8'(orows - 1); pool_col_size = 8'(ocols - 1);
      pool_kernel = p ? 4'(pk - 1) : 4'($urandom()); pool_stride = p ? 3'(ps - 1) : 3'($urandom());
      assoc = 3'(as);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      foreach (expq[n]) begin
        @(posedge clk); #1;
        checks++;
        if (beat !== expq[n]) begin
          failures++;
          if (failures < 10) $display("FAIL test %0d beat %0d got %p exp %p", t, n, beat, expq[n]);
        end
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      @(posedge clk); #1;
      checks++;
      if (beat.valid) begin failures++; $display("FAIL extra beat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
