// dpeu: dual processing element unit (two PEs, an adder and two result registers).
//
// In 8-bit mode (w16=0) the two PEs work independently on lanes 0 and 1.
// In 16-bit mode (w16=1) both PEs take lane 0 and the unit computes
//   sum A(16)*B(8) = 2^8 * sum A_msb(8)*B(8) + sum A_lsb(8)*B(8)
// for MAC and MUL: PE0 handles the signed upper byte of A and shifts its result
// left by 8, PE1 the unsigned lower byte plus the partial sum, and the adder joins
// them. For SED, PE0 and PE1 each take one 8-bit feature (upper and lower byte
// of the 16-bit point and centroid) and the adder sums the two squared
// differences: a 2-D squared Euclidean distance. ALU ops run byte-wise on the two
// halves. In 16-bit mode the fixed-point right shift is applied after the adder.
//
// Latency: operands at cycle t (last beat) -> result on out at t+3 (two PE
// stages plus the output register). In 16-bit mode the result is on lane 0 only.
// The split of Equation 3.2 over the PEs follows the specification; operand
// signedness, byte-wise ALU in 16-bit mode and the output registers' timing are
// this design's choices.
module dpeu
  import ndp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   en,        // pe_en bits of the two PEs
  input  logic         w16,
  input  dp_e          dp,
  input  op_e          opcode,
  input  logic [4:0]   shift,
  input  lane_in_t     in  [2],
  output lane_out_t    out [2],
  output logic [1:0]   zero_skip
);
  lane_in_t   pin [2];
  logic [7:0] pa [2], pb [2];
  logic       sa [2], sb [2], msb [2];
  logic [4:0] psh;
  logic [31:0] r [2];
  logic [1:0]  rv [2];
  logic        v [2];

  always_comb begin
    psh = w16 ? 5'd0 : shift;
    for (int i = 0; i < 2; i++) begin
      pin[i] = w16 ? in[0] : in[i];
      pa[i]  = pin[i].a[7:0];
      pb[i]  = pin[i].b[7:0];
      sa[i]  = (dp != DP_SED);
      sb[i]  = (dp != DP_SED);
      msb[i] = 1'b0;
    end
    if (w16) begin
      pin[0].psum = 32'd0;
      pa[0] = in[0].a[15:8];
      sa[1] = 1'b0;                                 // lower byte of A is unsigned
      if (dp == DP_SED || dp == DP_ALU) begin
        pb[0] = in[0].b[15:8];
        sa[0] = 1'b0; sb[0] = 1'b0; sb[1] = 1'b0;
      end else begin
        msb[0] = 1'b1;                              // 2^8 * A_msb * B
      end
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_pe
    pe #(.TAG_W(2)) u_pe (
      .clk, .rst_n, .en(en[i]), .dp, .opcode, .shift(psh), .msb_part(msb[i]),
      .a_signed(sa[i]), .b_signed(sb[i]),
      .valid(pin[i].valid), .first(pin[i].tag.first), .last(pin[i].tag.last),
      .tag({pin[i].tag.pool_first, pin[i].tag.pool_last}),
      .a(pa[i]), .b(pb[i]), .psum(pin[i].psum),
      .res_valid(v[i]), .res_tag(rv[i]), .res(r[i]), .zero_skip(zero_skip[i]));
  end

  // the extra adder of the DPEU
  logic [31:0] joined;
  always_comb begin
    if (dp == DP_ALU) joined = 32'(signed'({r[0][7:0], r[1][7:0]}));
    else              joined = r[0] + r[1];
    joined = 32'($signed(joined) >>> shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out[0] <= '0;
      out[1] <= '0;
    end else if (w16) begin
      out[0] <= '{valid: v[0] && v[1], pool_first: rv[1][1], pool_last: rv[1][0], data: joined};
      out[1] <= '0;
    end else begin
      for (int i = 0; i < 2; i++)
        out[i] <= '{valid: v[i], pool_first: rv[i][1], pool_last: rv[i][0], data: r[i]};
    end
  end
endmodule
