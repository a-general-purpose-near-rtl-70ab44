// pe_array: the 16 processing elements, organised as eight DPEUs.
//
// Lane i of the array is PE i; DPEU k owns lanes 2k and 2k+1. All DPEUs share
// the PE-level configuration (data width, datapath pattern, opcode, shift);
// pe_en enables PEs one by one. In 16-bit mode DPEU k reads and writes lane 2k.
// Latency from the last operand beat to a lane result is three cycles.
// zero_skip reports, per PE, a multiplier beat suppressed by zero detection.
module pe_array
  import ndp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NLANES-1:0] pe_en,
  input  logic              w16,
  input  dp_e               dp,
  input  op_e               opcode,
  input  logic [4:0]        shift,
  input  lane_in_t          in  [NLANES],
  output lane_out_t         out [NLANES],
  output logic [NLANES-1:0] zero_skip
);
  for (genvar k = 0; k < NDPEU; k++) begin : g_dpeu
    dpeu u_dpeu (
      .clk, .rst_n, .en(pe_en[2*k +: 2]), .w16, .dp, .opcode, .shift,
      .in(in[2*k +: 2]), .out(out[2*k +: 2]), .zero_skip(zero_skip[2*k +: 2]));
  end
endmodule
