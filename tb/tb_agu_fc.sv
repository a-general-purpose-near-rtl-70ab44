// tb_agu_fc: runs the FC address generator for random lengths and set sizes and
// compares every beat with the nested-loop reference; checks one beat per cycle
// and the done pulse on the final beat.
module tb_agu_fc;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, busy, done;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [11:0] in_len, out_len;
  logic [2:0] assoc;
  beat_t beat;
  agu_fc dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      automatic int il = $urandom_range(1, 40), ol = $urandom_range(1, 40), as = $urandom_range(0, 3);
      automatic int nout = (ol + (1 << as) - 1) >> as;
      automatic int n = 0, bpre = 0;
      in_len = 12'(il - 1); out_len = 12'(ol - 1); assoc = 3'(as);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int o = 0; o < nout; o++) begin
        for (int i = 0; i < il; i++) begin
          @(posedge clk); #1;
          checks++;
          if (!beat.valid || beat.a_off != ELEM_W'(i) || beat.b_off != ELEM_W'(bpre + i) ||
              beat.p_off != ROW_W'(o) || beat.first != (i == 0) || beat.last != (i == il - 1)) begin
            failures++;
            $display("FAIL beat il=%0d o=%0d i=%0d got %p", il, o, i, beat);
          end
          n++;
        end
        bpre += il;
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      @(posedge clk); #1;
      checks++;
      if (beat.valid || busy) begin failures++; $display("FAIL extra beat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
