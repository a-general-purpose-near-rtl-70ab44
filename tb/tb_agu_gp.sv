// tb_agu_gp: runs the GP address generator for random loop/length settings and
// compares every beat with a reference of the two wrapping operand streams;
// checks the beat count (one per cycle) and the done pulse.
module tb_agu_gp;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, busy, done;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic [11:0] loop_a, loop_b, len_a, len_b;
  beat_t beat;
  agu_gp dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int la, lb, na, nb, total;
      if (k % 2 == 0) begin
        // K-means shape: A every cycle, B every len_a cycles
        na = $urandom_range(1, 20); nb = $urandom_range(1, 6); la = 1; lb = na;
      end else begin
        la = $urandom_range(1, 4); lb = $urandom_range(1, 4);
        na = $urandom_range(1, 6); nb = $urandom_range(1, 6);
      end
      // the run ends when both streams are at their final element and cycle
      total = 0;
      for (int t = 1; t < 100000; t++)
        if (((t - 1) / la) % na == na - 1 && ((t - 1) / lb) % nb == nb - 1 &&
            (t - 1) % la == la - 1 && (t - 1) % lb == lb - 1) begin total = t; break; end
      loop_a = 12'(la - 1); loop_b = 12'(lb - 1); len_a = 12'(na - 1); len_b = 12'(nb - 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int t = 0; t < total; t++) begin
        @(posedge clk); #1;
        checks++;
        if (!beat.valid || beat.a_off != ELEM_W'((t / la) % na) || beat.b_off != ELEM_W'((t / lb) % nb) ||
            !beat.first || !beat.last) begin
          failures++;
          $display("FAIL t=%0d a=%0d b=%0d", t, beat.a_off, beat.b_off);
        end
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done missing after %0d beats", total); end
      @(posedge clk); #1;
      checks++;
      if (beat.valid) begin failures++; $display("FAIL extra beat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
