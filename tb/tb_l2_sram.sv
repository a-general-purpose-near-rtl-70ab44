// tb_l2_sram: MCU writes and reads with byte enables across all four memories
// (reduced depth), NDPU row reads that must see the MCU's words in their lanes,
// NDPU row writes with lane masks read back by the MCU, and no MCU grant while
// the NDPU owns the memories.
module tb_l2_sram;
  import ndp_pkg::*;
  logic clk = 0, rst_n = 1'b1, ndp_active = 0;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;
  logic mcu_req = 0, mcu_we = 0, mcu_gnt, mcu_rvalid;
  logic [3:0] mcu_be = 4'hf;
  logic [16:0] mcu_addr = 0;
  logic [31:0] mcu_wdata = 0, mcu_rdata;
  mreq_t req [NMEM];
  logic [CFG_W-1:0] rdata [NMEM];
  l2_sram #(.DEPTH(16)) dut (.*);
  logic [31:0] model [NMEM][16][NLANES];
  int checks = 0, failures = 0;
  task automatic chk(logic c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic logic [16:0] wa(int m, int r, int l);
    return 17'((m << 15) | (r << 4) | l);
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int m = 0; m < NMEM; m++) req[m] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < NMEM; m++)
      for (int r = 0; r < 16; r++)
        for (int l = 0; l < NLANES; l++) begin
          @(negedge clk); mcu_req = 1; mcu_we = 1; mcu_be = 4'hf; mcu_addr = wa(m, r, l);
          mcu_wdata = $urandom(); model[m][r][l] = mcu_wdata;
        end
    @(negedge clk); mcu_req = 0;
    for (int k = 0; k < 300; k++) begin
      automatic int m = $urandom_range(0, 3), r = $urandom_range(0, 15), l = $urandom_range(0, 15);
      @(negedge clk); mcu_req = 1; mcu_addr = wa(m, r, l); mcu_we = 1'($urandom_range(0, 1));
      mcu_be = 4'($urandom()); mcu_wdata = $urandom();
      if (mcu_we) begin
        for (int b = 0; b < 4; b++) if (mcu_be[b]) model[m][r][l][8*b +: 8] = mcu_wdata[8*b +: 8];
      end else begin
        @(negedge clk); mcu_req = 0;
        chk(mcu_rvalid && mcu_rdata == model[m][r][l], "MCU read");
      end
    end
    @(negedge clk); mcu_req = 0;
    // NDPU side
    ndp_active = 1;
    for (int k = 0; k < 100; k++) begin
      automatic int r [NMEM];
      @(negedge clk);
      for (int m = 0; m < NMEM; m++) begin
        r[m] = $urandom_range(0, 15);
        req[m] = '0; req[m].en = 1; req[m].row = ROW_W'(r[m]);
        if (k % 3 == 2) begin
          req[m].we = 1; req[m].lane_we = 16'($urandom());
          for (int l = 0; l < NLANES; l++) begin
            req[m].wdata[32*l +: 32] = $urandom();
            if (req[m].lane_we[l]) model[m][r[m]][l] = req[m].wdata[32*l +: 32];
          end
        end
      end
      mcu_req = 1; mcu_we = 0; mcu_addr = 0;
      #1 chk(!mcu_gnt, "MCU held off");
      @(negedge clk);
      mcu_req = 0;
      if (k % 3 != 2)
        for (int m = 0; m < NMEM; m++)
          for (int l = 0; l < NLANES; l++)
            chk(rdata[m][32*l +: 32] == model[m][r[m]][l], "NDPU row read");
      for (int m = 0; m < NMEM; m++) req[m] = '0;
    end
    ndp_active = 0;
    for (int m = 0; m < NMEM; m++)
      for (int l = 0; l < NLANES; l++) begin
        @(negedge clk); mcu_req = 1; mcu_we = 0; mcu_addr = wa(m, 5, l);
        @(negedge clk); mcu_req = 0;
        chk(mcu_rdata == model[m][5][l], "MCU read after NDPU write");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
