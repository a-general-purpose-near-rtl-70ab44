// crossbar: connects the four memories to the four NDPU ports.
//
// The NDPU has three read ports (InputA, InputB, Psum) and one write port
// (Result); the context selects which memory (0-3) serves each port. Every
// memory receives the request of the port that selects it; a read port's data
// is the 512-bit row (16 lanes, one per PE) of its memory, routed with the
// memory selection of the previous cycle, since memories answer one cycle after
// the request. During configuration the context read of MEM3 takes precedence.
// Two active requests for one memory in the same cycle are a configuration
// error: conflict is raised and an assertion fires. Each port is a multiplexer
// across memories for all 16 lanes at once. The port-to-memory freedom follows
// the specification; the conflict check is this design's addition.
module crossbar
  import ndp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        sel_a, sel_b, sel_p, sel_r,
  input  logic              cfg_rd,
  input  logic [ROW_W-1:0]  cfg_addr,
  input  logic              a_en, b_en, p_en,
  input  logic [ROW_W-1:0]  a_row, b_row, p_row,
  input  mreq_t             res_wr,
  output mreq_t             mem_req   [NMEM],
  input  logic [CFG_W-1:0]  mem_rdata [NMEM],
  output logic [CFG_W-1:0]  a_data, b_data, p_data, cfg_data,
  output logic              conflict
);
  logic [NMEM-1:0] hit [4];
  logic [1:0] sa_q, sb_q, sp_q;

  always_comb begin
    for (int m = 0; m < NMEM; m++) begin
      mem_req[m] = '0;
      hit[0][m] = a_en && sel_a == 2'(m);
      hit[1][m] = b_en && sel_b == 2'(m);
      hit[2][m] = p_en && sel_p == 2'(m);
      hit[3][m] = res_wr.en && sel_r == 2'(m);
      if (hit[3][m])      mem_req[m] = res_wr;
      else if (hit[0][m]) mem_req[m] = '{en: 1'b1, we: 1'b0, row: a_row, lane_we: '0, wdata: '0};
      else if (hit[1][m]) mem_req[m] = '{en: 1'b1, we: 1'b0, row: b_row, lane_we: '0, wdata: '0};
      else if (hit[2][m]) mem_req[m] = '{en: 1'b1, we: 1'b0, row: p_row, lane_we: '0, wdata: '0};
    end
    if (cfg_rd) mem_req[NMEM-1] = '{en: 1'b1, we: 1'b0, row: cfg_addr, lane_we: '0, wdata: '0};
    conflict = 1'b0;
    for (int m = 0; m < NMEM; m++)
      conflict |= (32'(hit[0][m]) + 32'(hit[1][m]) + 32'(hit[2][m]) + 32'(hit[3][m])) > 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_q <= '0; sb_q <= '0; sp_q <= '0;
    end else begin
      sa_q <= sel_a; sb_q <= sel_b; sp_q <= sel_p;
    end
  end

  assign a_data   = mem_rdata[sa_q];
  assign b_data   = mem_rdata[sb_q];
  assign p_data   = mem_rdata[sp_q];
  assign cfg_data = mem_rdata[NMEM-1];

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("crossbar: two ports use the same memory in one cycle");
endmodule
