// image_vectorizer: image preprocessing. Cuts a raster-scanned image of
// IMG_W x IMG_H pixels into blocks of BH rows by BW columns; each block is one
// K = BH*BW dimensional input vector X = (X_0 .. X_K-1), with X_(r*BW+c) the
// pixel in row r, column c of the block. Blocks leave in raster order.
//
// Pixels arrive one per accepted clock (pix_valid && pix_ready), row after row,
// starting at the top left corner of a frame; the module counts columns and
// rows itself and wraps to the next frame after IMG_H rows. The first BH-1 rows
// of each band of BH rows go into a line buffer of (BH-1) x IMG_W pixels. On
// the band's last row, every BW-th pixel completes a block: the vector is built
// from the line buffer, the last BW-1 pixels of the current row and the
// incoming pixel, and is registered at the output (vec_valid, one clock after
// its last pixel). vec_last marks the last block of a frame. The output is a
// valid/ready stream; while a vector waits (vec_valid && !vec_ready) the input
// stalls (pix_ready low). IMG_W must be a multiple of BW and IMG_H of BH.
// The division into m x n blocks is the published scheme; the streaming
// interface, the line buffer and the default image size are this design's.
module image_vectorizer
  import vq_pkg::*;
#(
  parameter int unsigned IMG_W = 256,            // image width  (M)
  parameter int unsigned IMG_H = 256,            // image height (M)
  parameter int unsigned BH    = 2,              // block rows    (m)
  parameter int unsigned BW    = 2,              // block columns (n)
  parameter int unsigned K     = BH * BW         // vector dimension
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_valid,
  output logic   pix_ready,
  input  pixel_t pix,
  output logic   vec_valid,
  input  logic   vec_ready,
  output pixel_t vec [K],
  output logic   vec_last
);

  localparam int unsigned CW = idx_width(IMG_W);
  localparam int unsigned RW = idx_width(IMG_H);
  localparam int unsigned LB = (BH > 1) ? BH - 1 : 1;   // line buffer rows
  localparam int unsigned CB = (BW > 1) ? BW - 1 : 1;   // current-row history

  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;
  pixel_t        lbuf [LB][IMG_W];
  pixel_t        hist [CB];
  pixel_t        vec_q [K];
  logic          vec_valid_q, vec_last_q;

  logic   accept, band_last_row, blk_done;
  int unsigned rib;                                // row within band
  pixel_t vec_d [K];

  assign pix_ready = !(vec_valid_q && !vec_ready);
  assign accept    = pix_valid && pix_ready;

  always_comb begin
    rib           = 32'(row_q) % BH;
    band_last_row = (rib == BH - 1);
    blk_done      = band_last_row && ((32'(col_q) % BW) == BW - 1);
    for (int r = 0; r < BH; r++) begin
      for (int c = 0; c < BW; c++) begin
        if (r < BH - 1)
          vec_d[r*BW+c] = lbuf[r % LB][(32'(col_q) + 1 + c - BW) % IMG_W];
        else if (c == BW - 1)
          vec_d[r*BW+c] = pix;
        else
          vec_d[r*BW+c] = hist[c % CB];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_q       <= '0;
      row_q       <= '0;
      vec_valid_q <= 1'b0;
      vec_last_q  <= 1'b0;
    end else begin
      if (vec_valid_q && vec_ready) vec_valid_q <= 1'b0;
      if (accept) begin
        if (!band_last_row) lbuf[rib % LB][col_q] <= pix;
        if (BW > 1) begin
          // keep the last BW-1 pixels of the current row, oldest first
          for (int i = 0; i + 1 < CB; i++) hist[i] <= hist[i+1];
          hist[CB-1] <= pix;
        end
        if (blk_done) begin
          vec_q       <= vec_d;
          vec_valid_q <= 1'b1;
          vec_last_q  <= (32'(row_q) == IMG_H - 1) && (32'(col_q) == IMG_W - 1);
        end
        if (32'(col_q) == IMG_W - 1) begin
          col_q <= '0;
          row_q <= (32'(row_q) == IMG_H - 1) ? '0 : row_q + 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end
    end
  end

  assign vec_valid = vec_valid_q;
  assign vec       = vec_q;
  assign vec_last  = vec_last_q;

  initial begin
    assert (IMG_W % BW == 0 && IMG_H % BH == 0 && K == BH * BW)
      else $error("image_vectorizer: image %0dx%0d is not a whole number of %0dx%0d blocks",
                  IMG_W, IMG_H, BH, BW);
  end

endmodule
