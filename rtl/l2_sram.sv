// l2_sram: the 512 KB L2 of four memories, each of 16 cuts of 2048 x 32 bit.
//
// Two views. The MCU sees one 32-bit memory with byte enables and one access
// per cycle; its word address is {memory[16:15], row[14:4], cut[3:0]}, so
// consecutive words fill one 512-bit row across the 16 cuts. Read data returns
// one cycle after the request with rvalid. The NDPU sees each memory as a
// 512-bit-wide single-port memory: one row per memory per cycle, all 16 cuts
// at once, with a per-cut write enable. While ndp_active is high the NDPU owns
// all memories and MCU requests are not granted (gnt=0); otherwise the MCU is
// granted at once. The 4 x 16 organisation, the 32-bit MCU width and the
// exclusive ownership while the NDP runs follow the specification; the address
// interleaving and the grant are this design's choices.
module l2_sram
  import ndp_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ndp_active,
  // MCU port
  input  logic              mcu_req,
  input  logic              mcu_we,
  input  logic [3:0]        mcu_be,
  input  logic [16:0]       mcu_addr,
  input  logic [31:0]       mcu_wdata,
  output logic              mcu_gnt,
  output logic              mcu_rvalid,
  output logic [31:0]       mcu_rdata,
  // NDPU ports
  input  mreq_t             req   [NMEM],
  output logic [CFG_W-1:0]  rdata [NMEM]
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [1:0]  m_mem;
  logic [3:0]  m_cut;
  logic [10:0] m_row;
  logic [1:0]  rsel_mem;
  logic [3:0]  rsel_cut;

  assign m_mem   = mcu_addr[16:15];
  assign m_row   = mcu_addr[14:4];
  assign m_cut   = mcu_addr[3:0];
  assign mcu_gnt = mcu_req && !ndp_active;

  logic [31:0] q [NMEM][NLANES];

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    for (genvar c = 0; c < NLANES; c++) begin : g_cut
      logic          en, we;
      logic [3:0]    be;
      logic [AW-1:0] addr;
      logic [31:0]   wd;
      always_comb begin
        if (ndp_active) begin
          en   = req[m].en && (!req[m].we || req[m].lane_we[c]);
          we   = req[m].we;
          be   = 4'hf;
          addr = AW'(req[m].row);
          wd   = req[m].wdata[32*c +: 32];
        end else begin
          en   = mcu_req && m_mem == 2'(m) && m_cut == 4'(c);
          we   = mcu_we;
          be   = mcu_be;
          addr = AW'(m_row);
          wd   = mcu_wdata;
        end
      end
      sram_cut #(.DEPTH(DEPTH)) u_cut (
        .clk, .en, .we, .be, .addr, .wdata(wd), .rdata(q[m][c]));
      assign rdata[m][32*c +: 32] = q[m][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcu_rvalid <= 1'b0; rsel_mem <= '0; rsel_cut <= '0;
    end else begin
      mcu_rvalid <= mcu_gnt && !mcu_we;
      if (mcu_gnt && !mcu_we) begin
        rsel_mem <= m_mem;
        rsel_cut <= m_cut;
      end
    end
  end

  assign mcu_rdata = q[rsel_mem][rsel_cut];
endmodule
