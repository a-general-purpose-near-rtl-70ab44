// context_buffer: holds the configuration row and distributes its fields.
//
// On load it captures the 512-bit context row read from MEM3 and keeps it for
// the whole operation. Besides the raw fields (ctx) it decodes what several
// blocks need: the memory each crossbar port uses, the set size 2^assoc, the
// 16-bit mode flag and whether B holds 16-bit elements (SED and ALU in 16-bit
// mode, where B carries two 8-bit values; for MAC and MUL B is an 8-bit
// weight). Outputs change the cycle after load. The context fields follow the
// specification's three-level parameter list; the bit layout (ctx_t) is this
// design's own.
module context_buffer
  import ndp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [CFG_W-1:0] din,
  output ctx_t             ctx,
  output mode_e            mode,
  output dp_e              dp,
  output op_e              opcode,
  output logic [1:0]       sel_a,
  output logic [1:0]       sel_b,
  output logic [1:0]       sel_p,
  output logic [1:0]       sel_r,
  output logic [4:0]       set_size,
  output logic             w16,
  output logic             b16
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ctx <= '0;
    else if (load) ctx <= ctx_t'(din);
  end

  always_comb begin
    mode     = mode_e'(ctx.mode);
    dp       = dp_e'(ctx.datapath);
    opcode   = op_e'(ctx.opcode);
    sel_a    = ctx.xbar_config[1:0];
    sel_b    = ctx.xbar_config[3:2];
    sel_p    = ctx.xbar_config[5:4];
    sel_r    = ctx.xbar_config[7:6];
    set_size = 5'(1 << ctx.assoc);
    w16      = ctx.data_width;
    b16      = ctx.data_width && (dp == DP_SED || dp == DP_ALU);
  end
endmodule
