// output_buffer: collects lane results into 512-bit rows and writes them back.
//
// In systolic mode the members of a set finish one cycle apart; the buffer
// first delays lane results so that member j of a set of 2^assoc waits
// 2^assoc-1-j cycles, which lines all lanes up again. Every cycle in which any
// aligned lane holds a result, the buffer concatenates the 16 lane words into
// one row and issues a write to the Result port with a per-lane write enable,
// at row base+n, n counting the rows written since start. The write request is
// registered: it appears one cycle after the aligned results.
// Concatenating to SRAM width follows the specification; the re-alignment and
// the row counter are this design's choices.
module output_buffer
  import ndp_pkg::*;
#(
  parameter int unsigned DEPTH = NLANES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // clears the row counter
  input  logic              sys_en,
  input  logic [2:0]        assoc,
  input  logic              w16,
  input  logic [ROW_W-1:0]  base,
  input  lane_out_t         in [NLANES],
  output mreq_t             wr,
  output logic [ROW_W-1:0]  rows_written
);
  lane_out_t  dl [NLANES][DEPTH];
  lane_out_t  al [NLANES];
  logic [4:0] wait_cyc [NLANES];
  logic [4:0] setmask;

  always_comb begin
    setmask = 5'((1 << assoc) - 1);
    for (int l = 0; l < NLANES; l++) begin
      wait_cyc[l] = sys_en ? (setmask - (5'(w16 ? (l >> 1) : l) & setmask)) : 5'd0;
      al[l] = (wait_cyc[l] == 5'd0) ? in[l] : dl[l][4'(wait_cyc[l] - 5'd1)];
    end
  end

  logic any;
  always_comb begin
    any = 1'b0;
    for (int l = 0; l < NLANES; l++) any |= al[l].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLANES; l++)
        for (int d = 0; d < DEPTH; d++) dl[l][d] <= '0;
      wr <= '0;
      rows_written <= '0;
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        dl[l][0] <= in[l];
        for (int d = 1; d < DEPTH; d++) dl[l][d] <= dl[l][d-1];
      end
      wr.en <= any;
      wr.we <= any;
      if (start) rows_written <= '0;
      if (any) begin
        wr.row <= base + rows_written;
        for (int l = 0; l < NLANES; l++) begin
          wr.lane_we[l] <= al[l].valid;
          wr.wdata[32*l +: 32] <= al[l].data;
        end
        if (!start) rows_written <= rows_written + 1'b1;
      end
    end
  end
endmodule
