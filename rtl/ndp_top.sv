// ndp_top: general purpose near data processor beside a microcontroller's L2.
//
// A 512 KB L2 (four memories of 16 SRAM cuts) is shared between a
// microcontroller, which sees an ordinary 32-bit memory, and a coarse-grained
// reconfigurable processing unit of 16 PEs, which reads three 512-bit rows and
// writes one per cycle through a configurable crossbar. The MCU writes data and
// a 512-bit context row into the L2 (context at MEM3 row CFG_ROW) and pulses
// ndp_en; the controller then loads the context and runs the selected mode
// (CONV, CONV_POOL, FC or GP) to completion, writing results back into the L2,
// and pulses ndp_done. While ndp_busy is high the MCU is not granted access.
// Event outputs report gated multiplier beats, max-pool updates, ReLU clamps and
// crossbar conflicts for monitoring.
module ndp_top
  import ndp_pkg::*;
#(
  parameter int unsigned      DEPTH   = 2048,
  parameter logic [ROW_W-1:0] CFG_ROW = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // MCU (L2) port
  input  logic              mcu_req,
  input  logic              mcu_we,
  input  logic [3:0]        mcu_be,
  input  logic [16:0]       mcu_addr,
  input  logic [31:0]       mcu_wdata,
  output logic              mcu_gnt,
  output logic              mcu_rvalid,
  output logic [31:0]       mcu_rdata,
  // NDP control
  input  logic              ndp_en,
  output logic              ndp_busy,
  output logic              ndp_done,
  // events
  output logic [NLANES-1:0] evt_zero_skip,
  output logic [NLANES-1:0] evt_pool_update,
  output logic [NLANES-1:0] evt_relu_clamp,
  output logic              evt_conflict
);
  mreq_t            mem_req   [NMEM];
  logic [CFG_W-1:0] mem_rdata [NMEM];
  logic [CFG_W-1:0] a_data, b_data, p_data, cfg_data;
  mreq_t            res_wr;

  ctx_t  ctx;
  mode_e mode;
  dp_e   dp;
  op_e   opcode;
  logic [1:0] sel_a, sel_b, sel_p, sel_r, a_sub, b_sub;
  logic  w16, b16, cfg_rd, exe, start_op, a_en, b_en, p_en, beat_valid;
  logic [ROW_W-1:0] cfg_addr, a_row, b_row, p_row;
  tag_t  beat_tag;

  l2_sram #(.DEPTH(DEPTH)) u_l2 (
    .clk, .rst_n, .ndp_active(ndp_busy),
    .mcu_req, .mcu_we, .mcu_be, .mcu_addr, .mcu_wdata, .mcu_gnt, .mcu_rvalid, .mcu_rdata,
    .req(mem_req), .rdata(mem_rdata));

  crossbar u_xbar (
    .clk, .rst_n, .sel_a, .sel_b, .sel_p, .sel_r, .cfg_rd, .cfg_addr,
    .a_en, .b_en, .p_en, .a_row, .b_row, .p_row, .res_wr,
    .mem_req, .mem_rdata, .a_data, .b_data, .p_data, .cfg_data, .conflict(evt_conflict));

  controller #(.CFG_ROW(CFG_ROW)) u_ctrl (
    .clk, .rst_n, .ndp_en, .cfg_row(cfg_data), .cfg_rd, .cfg_addr,
    .busy(ndp_busy), .done(ndp_done), .exe, .start_op,
    .ctx, .mode, .dp, .opcode, .sel_a, .sel_b, .sel_p, .sel_r, .w16, .b16,
    .a_en, .b_en, .p_en, .a_row, .b_row, .p_row,
    .beat_valid, .beat_tag, .a_sub, .b_sub);

  ndpu u_ndpu (
    .clk, .rst_n, .start(start_op), .ctx, .dp, .opcode, .w16, .b16,
    .beat_valid, .beat_tag, .a_sub, .b_sub, .a_data, .b_data, .p_data,
    .res_wr, .zero_skip(evt_zero_skip), .pool_update(evt_pool_update),
    .relu_clamp(evt_relu_clamp));

  logic unused;
  assign unused = exe ^ (^mode);
endmodule
