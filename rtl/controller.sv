// controller: configuration FSM and address generation for the NDPU.
//
// States: IDLE (NDP off; the MCU owns the memories), CONFIG (one cycle: the
// context row CFG_ROW of MEM3 is read), EXE (the context buffer loads the row,
// the address generator of the selected mode starts and issues one beat per
// cycle until it reports exe_done) and DRAIN (waits DRAIN_CYC cycles so the
// last results leave the pipeline and are written), then back to IDLE with a
// done pulse. ndp_en starts an operation from IDLE.
//
// Each beat is turned into memory rows: A and B offsets are element offsets,
// packed four bytes or two halfwords per 32-bit word, so row = start +
// offset/4 (or /2) and the low offset bits select the element within the word;
// Psum offsets are whole rows and Psum is read only on first beats. Row
// requests go to the crossbar in the cycle of the beat; the beat flags and
// element selects are delayed one cycle to meet the read data.
// The FSM states and the address generation patterns follow the
// specification; CFG_ROW, the DRAIN state and the packing are this design's.
module controller
  import ndp_pkg::*;
#(
  parameter logic [ROW_W-1:0] CFG_ROW   = '0,
  parameter int unsigned      DRAIN_CYC = 2 * NLANES + 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ndp_en,
  input  logic [CFG_W-1:0] cfg_row,      // MEM3 read data
  output logic             cfg_rd,       // read MEM3 at CFG_ROW
  output logic [ROW_W-1:0] cfg_addr,
  output logic             busy,         // NDP owns the memories
  output logic             done,
  output logic             exe,          // EXE state
  output logic             start_op,     // first cycle after the context is loaded
  // context
  output ctx_t             ctx,
  output mode_e            mode,
  output dp_e              dp,
  output op_e              opcode,
  output logic [1:0]       sel_a, sel_b, sel_p, sel_r,
  output logic             w16,
  output logic             b16,
  // port requests (crossbar)
  output logic             a_en, b_en, p_en,
  output logic [ROW_W-1:0] a_row, b_row, p_row,
  // beat info aligned with read data
  output logic             beat_valid,
  output tag_t             beat_tag,
  output logic [1:0]       a_sub, b_sub
);
  typedef enum logic [1:0] {S_IDLE, S_CONFIG, S_EXE, S_DRAIN} state_e;
  state_e state;
  logic   load_q, exe_done;
  logic [7:0] drain;


  context_buffer u_ctx (
    .clk, .rst_n, .load(load_q), .din(cfg_row), .ctx, .mode, .dp, .opcode,
    .sel_a, .sel_b, .sel_p, .sel_r, .set_size(), .w16, .b16);

  // address generators
  beat_t b_cp, b_fc, b_gp, beat;
  logic  bz_cp, bz_fc, bz_gp, d_cp, d_fc, d_gp;
  logic  st_cp, st_fc, st_gp;

  assign st_cp = start_op && (mode == MODE_CONV || mode == MODE_CONV_POOL);
  assign st_fc = start_op && (mode == MODE_FC);
  assign st_gp = start_op && (mode == MODE_GP);

  agu_conv_pool u_cp (
    .clk, .rst_n, .start(st_cp), .pool(mode == MODE_CONV_POOL),
    .chi(ctx.chi), .cho(ctx.cho), .column_size(ctx.column_size),
    .kernel_size(ctx.kernel_size), .stride(ctx.stride),
    .pool_row_size(ctx.pool_row_size), .pool_col_size(ctx.pool_col_size),
    .pool_kernel(ctx.pool_kernel), .pool_stride(ctx.pool_stride), .assoc(ctx.assoc),
    .beat(b_cp), .busy(bz_cp), .done(d_cp));

  agu_fc u_fc (
    .clk, .rst_n, .start(st_fc), .in_len(ctx.in_len), .out_len(ctx.out_len),
    .assoc(ctx.assoc), .beat(b_fc), .busy(bz_fc), .done(d_fc));

  agu_gp u_gp (
    .clk, .rst_n, .start(st_gp), .loop_a(ctx.loop_a), .loop_b(ctx.loop_b),
    .len_a(ctx.len_a), .len_b(ctx.len_b), .beat(b_gp), .busy(bz_gp), .done(d_gp));

  always_comb begin
    unique case (mode)
      MODE_FC: beat = b_fc;
      MODE_GP: beat = b_gp;
      default: beat = b_cp;
    endcase
  end
  assign exe_done = d_cp || d_fc || d_gp;

  // FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; load_q <= 1'b0; start_op <= 1'b0; drain <= '0; done <= 1'b0;
    end else begin
      load_q   <= (state == S_CONFIG);
      start_op <= load_q;
      done     <= 1'b0;
      unique case (state)
        S_IDLE:   if (ndp_en) state <= S_CONFIG;
        S_CONFIG: state <= S_EXE;
        S_EXE:    if (exe_done) begin state <= S_DRAIN; drain <= 8'(DRAIN_CYC); end
        S_DRAIN:  if (drain == 8'd0) begin state <= S_IDLE; done <= 1'b1; end
                  else drain <= drain - 1'b1;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign exe      = (state == S_EXE);
  assign cfg_rd   = (state == S_CONFIG);
  assign cfg_addr = CFG_ROW;

  // beat -> rows
  always_comb begin
    a_en  = beat.valid;
    b_en  = beat.valid;
    p_en  = beat.valid && beat.first;
    a_row = ctx.addr_a_start + (w16 ? ROW_W'(beat.a_off >> 1) : ROW_W'(beat.a_off >> 2));
    b_row = ctx.addr_b_start + (b16 ? ROW_W'(beat.b_off >> 1) : ROW_W'(beat.b_off >> 2));
    p_row = ctx.addr_psum_start + beat.p_off;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_valid <= 1'b0; beat_tag <= '0; a_sub <= '0; b_sub <= '0;
    end else begin
      beat_valid <= beat.valid;
      beat_tag   <= '{first: beat.first, last: beat.last,
                      pool_first: beat.pool_first, pool_last: beat.pool_last};
      a_sub      <= w16 ? {1'b0, beat.a_off[0]} : beat.a_off[1:0];
      b_sub      <= b16 ? {1'b0, beat.b_off[0]} : beat.b_off[1:0];
    end
  end

  // the busy flags of the generators are informative only
  logic unused;
  assign unused = bz_cp ^ bz_fc ^ bz_gp;
endmodule
