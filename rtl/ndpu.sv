// ndpu: near data processing unit: input buffer, PE array, output registers and
// output buffer.
//
// Rows from the InputA, InputB and Psum ports enter the input buffer together
// with the beat flags, are turned into per-PE operands (systolic or independent
// per the context), processed by the 16 PEs / 8 DPEUs, passed through the
// ReLU / max-pool output registers and written back as rows through the Result
// port by the output buffer. Latency from the row data to the write request of
// the first set member: 1 (input buffer) + 3 (PE array) + 1 (output registers) +
// 2^assoc-1 (re-alignment, systolic only) + 1 (write register) cycles.
// The specification places the ReLU/max-pool registers in the controller; they
// sit here, on the same path, which changes nothing in function.
module ndpu
  import ndp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  ctx_t              ctx,
  input  dp_e               dp,
  input  op_e               opcode,
  input  logic              w16,
  input  logic              b16,
  input  logic              beat_valid,
  input  tag_t              beat_tag,
  input  logic [1:0]        a_sub,
  input  logic [1:0]        b_sub,
  input  logic [CFG_W-1:0]  a_data,
  input  logic [CFG_W-1:0]  b_data,
  input  logic [CFG_W-1:0]  p_data,
  output mreq_t             res_wr,
  output logic [NLANES-1:0] zero_skip,
  output logic [NLANES-1:0] pool_update,
  output logic [NLANES-1:0] relu_clamp
);
  logic [31:0] a_row [NLANES], b_row [NLANES], p_row [NLANES];
  lane_in_t    lin   [NLANES];
  lane_out_t   lres  [NLANES];
  lane_out_t   lpool [NLANES];
  logic [ROW_W-1:0] rows_written;

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      a_row[l] = a_data[32*l +: 32];
      b_row[l] = b_data[32*l +: 32];
      p_row[l] = p_data[32*l +: 32];
    end
  end

  input_buffer u_ib (
    .clk, .rst_n, .sys_en(ctx.sys_en), .assoc(ctx.assoc), .w16, .b16, .pe_en(ctx.pe_en),
    .beat_valid, .beat_tag, .a_sub, .b_sub, .a_row, .b_row, .p_row, .out(lin));

  pe_array u_pa (
    .clk, .rst_n, .pe_en(ctx.pe_en), .w16, .dp, .opcode, .shift(ctx.shift_param),
    .in(lin), .out(lres), .zero_skip);

  relu_pool u_rp (
    .clk, .rst_n, .relu_en(ctx.relu_en), .in(lres), .out(lpool), .pool_update, .relu_clamp);

  output_buffer u_ob (
    .clk, .rst_n, .start, .sys_en(ctx.sys_en), .assoc(ctx.assoc), .w16,
    .base(ctx.addr_psum_start), .in(lpool), .wr(res_wr), .rows_written);

  logic unused;
  assign unused = ^rows_written;
endmodule
