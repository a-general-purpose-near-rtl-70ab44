// relu_pool: output registers that apply ReLU and max-pooling to PE results.
//
// One 32-bit register per lane. A result with pool_first set loads the register,
// later results of the same pooling window replace it when they are greater, and
// the result with pool_last set releases the window maximum one cycle later on
// out. With relu_en, negative results are taken as zero first. Convolution
// without pooling and FC mode mark every result as first and last, so results
// pass through (with optional ReLU) after one cycle. This realises the output
// registers of the controller that perform ReLU and max-pooling in the
// convolution-with-pooling mode; updates and clamps are reported for statistics.
module relu_pool
  import ndp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              relu_en,
  input  lane_out_t         in  [NLANES],
  output lane_out_t         out [NLANES],
  output logic [NLANES-1:0] pool_update,  // a later value replaced the stored maximum
  output logic [NLANES-1:0] relu_clamp    // a negative value was set to zero
);
  logic signed [31:0] maxq [NLANES];
  logic signed [31:0] v    [NLANES];
  logic signed [31:0] m    [NLANES];

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      relu_clamp[l]  = in[l].valid && relu_en && in[l].data[31];
      v[l]           = relu_clamp[l] ? 32'sd0 : $signed(in[l].data);
      pool_update[l] = in[l].valid && !in[l].pool_first && (v[l] > maxq[l]);
      m[l]           = (in[l].pool_first || v[l] > maxq[l]) ? v[l] : maxq[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLANES; l++) begin
        maxq[l] <= '0;
        out[l]  <= '0;
      end
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        if (in[l].valid) maxq[l] <= m[l];
        out[l] <= '{valid: in[l].valid && in[l].pool_last, pool_first: 1'b1,
                    pool_last: 1'b1, data: m[l]};
      end
    end
  end
endmodule
