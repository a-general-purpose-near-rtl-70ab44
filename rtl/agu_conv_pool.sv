// agu_conv_pool: address generation for CONV and CONV_POOL modes.
//
// Produces one MAC beat per cycle for every output pixel of every pooling
// window, in the order of the specification's CONV_POOL pseudo code: over
// pooling windows (pool_row, pool_col, stepping by pool_stride), then the
// output pixels (i, j) inside a window, then kernel row ii, kernel column jj and
// input channel kk. The ifmap element read for a beat is
//   ((orow*stride + ii) * W + ocol*stride + jj) * chi + kk,
// with orow = pool_row + i, ocol = pool_col + j and W the ifmap row length
// (column_size), i.e. the ifmap is stored pixel by pixel, channels innermost.
// The kernel element is kbase + ((ii*K + jj)*chi + kk) and the bias row is the
// channel pass. first/last mark the first and last beat of one output pixel;
// pool_first/pool_last are set on every beat of the first and last output pixel
// of a pooling window (the PE keeps the flags of a pixel's last beat). After all windows the next pass starts: bias row
// + 1 and kbase + K*K*chi, so lane k then computes channel pass*2^assoc + k.
// There are ceil(cho / 2^assoc) passes. With pool=0 (CONV mode) the window is
// 1x1 with step 1, so every output pixel is released at once.
// The pseudo code adds pool_row and i*stride directly; that equals the formula
// above for stride 1, and the formula above keeps larger strides correct.
module agu_conv_pool
  import ndp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        pool,          // 1: CONV_POOL, 0: CONV
  input  logic [7:0]  chi,           // all sizes minus one
  input  logic [7:0]  cho,
  input  logic [7:0]  column_size,
  input  logic [3:0]  kernel_size,
  input  logic [2:0]  stride,
  input  logic [7:0]  pool_row_size,
  input  logic [7:0]  pool_col_size,
  input  logic [3:0]  pool_kernel,
  input  logic [2:0]  pool_stride,
  input  logic [2:0]  assoc,
  output beat_t       beat,
  output logic        busy,
  output logic        done
);
  logic [8:0]  prow, pcol;           // pooling window origin (ofmap coordinates)
  logic [4:0]  i, j, ii, jj;
  logic [8:0]  kk;
  logic [8:0]  pass, n_pass;
  logic [ELEM_W-1:0] kernel, kbase;
  logic [4:0]  pk, ps;               // window size and step (actual values)
  logic [8:0]  prs, pcs;             // ofmap size (actual values)
  logic [4:0]  k;
  logic [3:0]  s;
  logic [8:0]  nchi;

  always_comb begin
    pk   = pool ? 5'(pool_kernel) + 5'd1 : 5'd1;
    ps   = pool ? 5'(pool_stride) + 5'd1 : 5'd1;
    prs  = 9'(pool_row_size) + 9'd1;
    pcs  = 9'(pool_col_size) + 9'd1;
    k    = 5'(kernel_size) + 5'd1;
    s    = 4'(stride) + 4'd1;
    nchi = 9'(chi) + 9'd1;
    n_pass = 9'((({1'b0, cho} + 9'd1 + 9'((1 << assoc) - 1)) >> assoc) - 9'd1);
  end

  // element offsets of the current beat
  logic [8:0]  orow, ocol;
  logic [31:0] irow, icol, aoff;
  logic        l_kk, l_jj, l_ii, l_j, l_i, l_pcol, l_prow, l_pass;

  always_comb begin
    orow = prow + 9'(i);
    ocol = pcol + 9'(j);
    irow = 32'(orow) * 32'(s) + 32'(ii);
    icol = 32'(ocol) * 32'(s) + 32'(jj);
    aoff = (irow * (32'(column_size) + 32'd1) + icol) * 32'(nchi) + 32'(kk);
    l_kk   = (kk == nchi - 9'd1);
    l_jj   = (jj == k - 5'd1);
    l_ii   = (ii == k - 5'd1);
    l_j    = (j == pk - 5'd1);
    l_i    = (i == pk - 5'd1);
    l_pcol = (pcol + 9'(ps) + 9'(pk) > pcs);   // no further window in this row
    l_prow = (prow + 9'(ps) + 9'(pk) > prs);
    l_pass = (pass == n_pass);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prow <= '0; pcol <= '0; i <= '0; j <= '0; ii <= '0; jj <= '0; kk <= '0;
      pass <= '0; kernel <= '0; kbase <= '0;
      busy <= 1'b0; done <= 1'b0; beat <= '0;
    end else begin
      done <= 1'b0;
      beat.valid <= 1'b0;
      if (start) begin
        prow <= '0; pcol <= '0; i <= '0; j <= '0; ii <= '0; jj <= '0; kk <= '0;
        pass <= '0; kernel <= '0; kbase <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        beat <= '{valid: 1'b1, a_off: ELEM_W'(aoff), b_off: kbase + kernel,
                  p_off: ROW_W'(pass),
                  first: ii == 0 && jj == 0 && kk == 0,
                  last: l_kk && l_jj && l_ii,
                  pool_first: i == 0 && j == 0,
                  pool_last: l_i && l_j};
        kernel <= kernel + 1'b1;
        if (!l_kk) kk <= kk + 1'b1;
        else begin
          kk <= '0;
          if (!l_jj) jj <= jj + 1'b1;
          else begin
            jj <= '0;
            if (!l_ii) ii <= ii + 1'b1;
            else begin
              ii <= '0;
              kernel <= '0;                       // one ofmap pixel done
              if (!l_j) j <= j + 1'b1;
              else begin
                j <= '0;
                if (!l_i) i <= i + 1'b1;
                else begin
                  i <= '0;                        // one pooling window done
                  if (!l_pcol) pcol <= pcol + 9'(ps);
                  else begin
                    pcol <= '0;
                    if (!l_prow) prow <= prow + 9'(ps);
                    else begin
                      prow <= '0;                 // one ofmap channel pass done
                      kbase <= kbase + ELEM_W'(32'(k) * 32'(k) * 32'(nchi));
                      if (!l_pass) pass <= pass + 1'b1;
                      else begin
                        busy <= 1'b0;
                        done <= 1'b1;
                      end
                    end
                  end
                end
              end
            end
          end
        end
      end
    end
  end
endmodule
