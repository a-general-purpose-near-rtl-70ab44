// input_buffer: turns memory rows into per-PE operands, systolic or independent.
//
// Each cycle it receives one 512-bit row from each of the InputA, InputB and
// Psum ports (one 32-bit word per lane) and the beat information of the
// address generator. It first extracts the addressed element from each word:
// a byte (8-bit mode) or a halfword (16-bit mode) of A, a byte of B, or a
// halfword of B when b16 is set (SED and ALU in 16-bit mode). Psum words are
// used whole.
//
// A "unit" is a PE in 8-bit mode and a DPEU (lane 2k) in 16-bit mode. Units are
// grouped into sets of 2^assoc members. With sys_en=0 every unit takes its own
// lane, one cycle after the row arrives. With sys_en=1 the A operand of the first
// member of each set (the set leader) is passed from member to member, one hop
// per cycle, so member j sees the leader's A j cycles later; the member's own
// B, Psum and beat flags are delayed by the same j cycles, so that members start
// one after the other in a systolic manner. Disabled PEs receive no valid beats.
// Latency: one cycle for the leader, plus j cycles for member j.
// The systolic/independent choice and the grouping by assoc follow the
// specification; the element packing and the delay-line implementation are this
// design's own.
module input_buffer
  import ndp_pkg::*;
#(
  parameter int unsigned DEPTH = NLANES   // deepest member position + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sys_en,
  input  logic [2:0]        assoc,
  input  logic              w16,
  input  logic              b16,
  input  logic [NLANES-1:0] pe_en,
  input  logic              beat_valid,
  input  tag_t              beat_tag,
  input  logic [1:0]        a_sub,
  input  logic [1:0]        b_sub,
  input  logic [31:0]       a_row [NLANES],
  input  logic [31:0]       b_row [NLANES],
  input  logic [31:0]       p_row [NLANES],
  output lane_in_t          out   [NLANES]
);
  lane_in_t    fresh [NLANES];
  lane_in_t    dl    [NLANES][DEPTH];   // per-lane delay line
  logic [15:0] achain [NLANES];
  logic [4:0]  pos   [NLANES];
  logic [4:0]  setmask;

  always_comb begin
    setmask = 5'((1 << assoc) - 1);
    for (int l = 0; l < NLANES; l++) begin
      // position of this lane's unit inside its set
      pos[l] = sys_en ? (5'(w16 ? (l >> 1) : l) & setmask) : 5'd0;
      fresh[l].valid = beat_valid && pe_en[l];
      fresh[l].tag   = beat_tag;
      fresh[l].a     = w16 ? (a_sub[0] ? a_row[l][31:16] : a_row[l][15:0])
                           : {8'd0, a_row[l][8*a_sub +: 8]};
      fresh[l].b     = b16 ? (b_sub[0] ? b_row[l][31:16] : b_row[l][15:0])
                           : {8'd0, b_row[l][8*b_sub +: 8]};
      fresh[l].psum  = p_row[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLANES; l++) begin
        achain[l] <= '0;
        for (int d = 0; d < DEPTH; d++) dl[l][d] <= '0;
      end
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        dl[l][0] <= fresh[l];
        for (int d = 1; d < DEPTH; d++) dl[l][d] <= dl[l][d-1];
        if (pos[l] == 5'd0)  achain[l] <= fresh[l].a;
        else if (w16)        achain[l] <= achain[(l + NLANES - 2) % NLANES];
        else                 achain[l] <= achain[(l + NLANES - 1) % NLANES];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      out[l]   = dl[l][4'(pos[l])];
      out[l].a = achain[l];
    end
  end
endmodule
