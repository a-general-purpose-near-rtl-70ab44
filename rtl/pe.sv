// pe: 8-bit processing element with multiplier, ALU, accumulator and shifter.
//
// Two pipeline stages. Stage 1 registers the multiplier output (32-bit register),
// the 8-bit ALU result and the partial sum that arrives with the first beat.
// Stage 2 adds the product (or ALU result) to either the incoming partial sum
// (first beat) or the 32-bit accumulator, and on the last beat shifts the sum and
// presents it on res with res_valid. A result therefore appears two cycles after
// the last operand beat. Datapath patterns (dp_e): MAC, MUL, ALU (opcode), and
// SED, which squares a-b with the multiplier and accumulates.
//
// Clock gating (two levels): the whole PE runs on a clock gated by en (the
// pe_en bit of the context), and the multiplier register additionally on a clock
// gated by zero detection: in MAC mode, a beat whose a or b is zero does not
// clock the multiplier register, and stage 2 adds zero instead.
//
// Operands are 8 bit; a_signed/b_signed pick signed or unsigned reading. With
// msb_part set (the upper half of a 16-bit DPEU operation) the result is shifted
// left by 8 instead of right by shift. The PE structure, clock gating and shift
// follow the specification; the stage split, the partial-sum register and the
// ALU opcode list are this design's choices. tag travels with the data.
// The two latches synthesis reports for this module are the enable latches of
// the two clock-gating cells, and are intended.
module pe
  import ndp_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,         // PE enable (first clock-gating level)
  input  dp_e              dp,
  input  op_e              opcode,
  input  logic [4:0]       shift,
  input  logic             msb_part,
  input  logic             a_signed,
  input  logic             b_signed,
  input  logic             valid,
  input  logic             first,
  input  logic             last,
  input  logic [TAG_W-1:0] tag,
  input  logic [7:0]       a,
  input  logic [7:0]       b,
  input  logic [31:0]      psum,
  output logic             res_valid,
  output logic [TAG_W-1:0] res_tag,
  output logic [31:0]      res,
  output logic             zero_skip   // a gated multiplier beat (for statistics)
);
  // ---------------- clock gating ----------------
  logic gclk_pe, gclk_mul, zero_det, mul_en;

  assign zero_det = valid && (dp == DP_MAC) && (a == 8'd0 || b == 8'd0);
  assign mul_en   = en && valid && !zero_det;
  assign zero_skip = en && zero_det;

  clock_gate u_cg_pe  (.clk(clk), .en(en),     .gclk(gclk_pe));
  clock_gate u_cg_mul (.clk(clk), .en(mul_en), .gclk(gclk_mul));

  // ---------------- stage 1 ----------------
  logic signed [9:0]  ax, bx, diff;
  logic signed [9:0]  ma, mb;
  logic signed [19:0] prod;
  logic [7:0]         alu;

  always_comb begin
    ax   = a_signed ? 10'(signed'(a)) : 10'({2'b00, a});
    bx   = b_signed ? 10'(signed'(b)) : 10'({2'b00, b});
    diff = ax - bx;
    ma   = (dp == DP_SED) ? diff : ax;
    mb   = (dp == DP_SED) ? diff : bx;
    prod = ma * mb;
    unique case (opcode)
      OP_ADD:  alu = a + b;
      OP_SUB:  alu = a - b;
      OP_AND:  alu = a & b;
      OP_OR:   alu = a | b;
      OP_XOR:  alu = a ^ b;
      OP_MAX:  alu = (ax > bx) ? a : b;
      OP_MIN:  alu = (ax < bx) ? a : b;
      OP_NOT:  alu = ~a;
      OP_SHL:  alu = a << b[2:0];
      OP_SHR:  alu = 8'(ax >>> b[2:0]);
      default: alu = a;
    endcase
  end

  logic [31:0]      mul_q;     // multiplier result register (zero-gated clock)
  logic [7:0]       alu_q;     // 8-bit intermediate register
  logic [31:0]      psum_q;
  logic             v1, f1, l1, z1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge gclk_mul or negedge rst_n) begin
    if (!rst_n) mul_q <= '0;
    else        mul_q <= 32'(prod);
  end

  always_ff @(posedge gclk_pe or negedge rst_n) begin
    if (!rst_n) begin
      alu_q <= '0; psum_q <= '0;
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; z1 <= 1'b0; t1 <= '0;
    end else begin
      v1 <= valid;
      f1 <= first;
      l1 <= last;
      z1 <= zero_det;
      t1 <= tag;
      if (valid) begin
        alu_q <= alu;
        if (first) psum_q <= psum;
      end
    end
  end

  // ---------------- stage 2 ----------------
  logic [31:0] acc_q, val, base, sum, shifted;
  logic        rv_q;

  assign res_valid = rv_q && en;

  always_comb begin
    if (dp == DP_ALU)
      val = a_signed ? 32'(signed'(alu_q)) : {24'd0, alu_q};
    else
      val = z1 ? 32'd0 : mul_q;
    if (f1 || dp == DP_MUL || dp == DP_ALU)
      base = (dp == DP_MAC) ? psum_q : 32'd0;
    else
      base = acc_q;
    sum     = base + val;
    shifted = msb_part ? (sum << 8) : 32'($signed(sum) >>> shift);
  end

  always_ff @(posedge gclk_pe or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0; res <= '0; rv_q <= 1'b0; res_tag <= '0;
    end else begin
      rv_q <= v1 && l1;
      if (v1) begin
        acc_q <= sum;
        if (l1) begin
          res     <= shifted;
          res_tag <= t1;
        end
      end
    end
  end
endmodule
