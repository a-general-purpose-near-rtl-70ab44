// agu_gp: address generation for general purpose (GP) mode.
//
// Two independent operand streams. Input A moves to its next element every
// loop_a cycles and wraps after len_a elements; input B moves every loop_b
// cycles and wraps after len_b elements. Every beat is a complete single-beat
// operation (first and last set). The run ends on the beat where both element
// counters and both cycle counters reach their final values. Example: distances
// of 128 points per lane to 4 centroids use loop_a=1, len_a=128, loop_b=128,
// len_b=4 and take 512 beats. One beat per cycle, registered; done pulses with
// the final beat. Follows the specification's GP pseudo code; the wrap-around of
// the counters, which that code leaves implicit, is this design's reading.
module agu_gp
  import ndp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] loop_a,   // minus one
  input  logic [11:0] loop_b,   // minus one
  input  logic [11:0] len_a,    // minus one
  input  logic [11:0] len_b,    // minus one
  output beat_t       beat,
  output logic        busy,
  output logic        done
);
  logic [11:0] loop_a_cnt, loop_b_cnt, len_a_cnt, len_b_cnt;
  logic        fin;

  assign fin = (len_a_cnt == len_a) && (len_b_cnt == len_b) &&
               (loop_a_cnt == loop_a) && (loop_b_cnt == loop_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_a_cnt <= '0; loop_b_cnt <= '0; len_a_cnt <= '0; len_b_cnt <= '0;
      busy <= 1'b0; done <= 1'b0; beat <= '0;
    end else begin
      done <= 1'b0;
      beat.valid <= 1'b0;
      if (start) begin
        loop_a_cnt <= '0; loop_b_cnt <= '0; len_a_cnt <= '0; len_b_cnt <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        beat <= '{valid: 1'b1, a_off: ELEM_W'(len_a_cnt), b_off: ELEM_W'(len_b_cnt),
                  p_off: '0, first: 1'b1, last: 1'b1, pool_first: 1'b1, pool_last: 1'b1};
        if (fin) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        if (loop_a_cnt == loop_a) begin
          loop_a_cnt <= '0;
          len_a_cnt  <= (len_a_cnt == len_a) ? 12'd0 : len_a_cnt + 1'b1;
        end else begin
          loop_a_cnt <= loop_a_cnt + 1'b1;
        end
        if (loop_b_cnt == loop_b) begin
          loop_b_cnt <= '0;
          len_b_cnt  <= (len_b_cnt == len_b) ? 12'd0 : len_b_cnt + 1'b1;
        end else begin
          loop_b_cnt <= loop_b_cnt + 1'b1;
        end
      end
    end
  end
endmodule
