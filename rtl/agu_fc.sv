// agu_fc: address generation for fully connected (FC) mode.
//
// Two nested loops. The inner loop runs in_len beats: beat fc_in reads input
// element fc_in (A), weight element b_pre+fc_in (B), and, on the first beat, the
// bias row fc_out (Psum); the first beat starts an accumulation and the last one
// ends it. The outer loop runs ceil(out_len / 2^assoc) times, because each
// member of a set of 2^assoc units computes its own output neuron; after each
// pass the weight pointer advances by in_len and the bias row by one. One beat
// per cycle, registered on beat; done pulses with the final beat.
// The loop structure follows the specification's FC pseudo code. That code
// sets the next weight base to the last weight address of the previous pass,
// which would read one weight twice; here the base advances by in_len instead.
module agu_fc
  import ndp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] in_len,    // minus one
  input  logic [11:0] out_len,   // minus one
  input  logic [2:0]  assoc,
  output beat_t       beat,
  output logic        busy,
  output logic        done
);
  logic [11:0]       fc_in, fc_out;
  logic [12:0]       n_out;     // outer passes, minus one
  logic [ELEM_W-1:0] b_pre;

  assign n_out = 13'((({1'b0, out_len} + 13'd1 + 13'((1 << assoc) - 1)) >> assoc) - 13'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc_in <= '0; fc_out <= '0; b_pre <= '0; busy <= 1'b0; beat <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      beat.valid <= 1'b0;
      if (start) begin
        fc_in <= '0; fc_out <= '0; b_pre <= '0; busy <= 1'b1;
      end else if (busy) begin
        beat <= '{valid: 1'b1, a_off: ELEM_W'(fc_in), b_off: b_pre + ELEM_W'(fc_in),
                  p_off: ROW_W'(fc_out), first: fc_in == 12'd0, last: fc_in == in_len,
                  pool_first: 1'b1, pool_last: 1'b1};
        if (fc_in == in_len) begin
          fc_in <= '0;
          b_pre <= b_pre + ELEM_W'(in_len) + 1'b1;
          if (13'(fc_out) == n_out) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            fc_out <= fc_out + 1'b1;
          end
        end else begin
          fc_in <= fc_in + 1'b1;
        end
      end
    end
  end
endmodule
