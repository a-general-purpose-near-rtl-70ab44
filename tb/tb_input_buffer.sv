// tb_input_buffer: feeds numbered rows and checks, for each set size, data
// width and flow, that every lane gets the right element: in independent flow
// its own lane one cycle later; in systolic flow the A element of its set
// leader and its own B, Psum and flags, delayed by its position in the set.
// Also checks byte and halfword selection and that disabled PEs get no beats.
module tb_input_buffer;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic sys_en, w16, b16, beat_valid;
  logic [2:0] assoc;
  logic [NLANES-1:0] pe_en;
  tag_t beat_tag;
  logic [1:0] a_sub, b_sub;
  logic [31:0] a_row [NLANES], b_row [NLANES], p_row [NLANES];
  lane_in_t out [NLANES];
  input_buffer dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // history of what was fed: [cycle][lane]
  logic [31:0] ha [64][NLANES], hb [64][NLANES], hp [64][NLANES];
  logic [1:0]  hsa [64], hsb [64];
  logic        hv [64];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 24; cfg++) begin
      sys_en = cfg % 2; w16 = (cfg / 2) % 2; b16 = w16 && (cfg % 3 == 0);
      assoc = 3'(cfg % (w16 ? 4 : 5));
      pe_en = 16'hffff;
      if (cfg % 5 == 4) pe_en = 16'h7fff;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        beat_valid = (t < 24); beat_tag = tag_t'(4'(t));
        a_sub = 2'($urandom()); b_sub = 2'($urandom());
        hv[t] = beat_valid; hsa[t] = a_sub; hsb[t] = b_sub;
        for (int l = 0; l < NLANES; l++) begin
          a_row[l] = $urandom(); b_row[l] = $urandom(); p_row[l] = $urandom();
          ha[t][l] = a_row[l]; hb[t][l] = b_row[l]; hp[t][l] = p_row[l];
        end
        #1;
        // check outputs of this cycle against history
        for (int l = 0; l < NLANES; l++) begin
          automatic int step = w16 ? 2 : 1;
          automatic int u = l / step;
          automatic int set = 1 << assoc;
          automatic int pos = sys_en ? (u % set) : 0;
          automatic int lead = sys_en ? (u - pos) * step : l;
          automatic int src = t - 1 - pos;
          logic [15:0] ea, eb;
          if (w16 && (l % 2 == 1)) continue;
          if (src < 0) continue;
          ea = w16 ? 16'(ha[src][lead] >> (16 * hsa[src][0])) : {8'd0, 8'(ha[src][lead] >> (8 * hsa[src]))};
          eb = b16 ? 16'(hb[src][l] >> (16 * hsb[src][0])) : {8'd0, 8'(hb[src][l] >> (8 * hsb[src]))};
          checks++;
          if (out[l].valid != (hv[src] && pe_en[l]) ||
              (out[l].valid && (out[l].a != ea || out[l].b != eb || out[l].psum != hp[src][l] ||
                                out[l].tag != tag_t'(4'(src))))) begin
            failures++;
            if (failures < 10)
              $display("FAIL cfg=%0d t=%0d lane=%0d pos=%0d a=%h exp %h b=%h exp %h", cfg, t, l, pos,
                       out[l].a, ea, out[l].b, eb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
