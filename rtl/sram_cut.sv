// sram_cut: one 2048 x 32-bit single-port SRAM cut.
//
// Stands for one of the 64 SRAM macros of the L2 (four memories of 16 cuts).
// Written as a plain memory array so that synthesis infers a memory. One access
// per clock: with en=1 and we=1 the bytes selected by be are written, with en=1
// and we=0 the word at addr appears on rdata one cycle later. rdata holds its
// value while en=0. The single-port, one-cycle-read behaviour and the byte
// enables (needed by the 32-bit MCU bus) are this design's choice; the
// specification only gives the count and total size of the cuts.
module sram_cut #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int i = 0; i < 4; i++)
          if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
