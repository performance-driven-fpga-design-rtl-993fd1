// vq_codebook: storage for the trained codebook of N codevectors, each of K
// pixels of PIX_W bits (codevector C_m = (C_m0 .. C_m,K-1)).
//
// The codebook is trained off line, so here it is a register file loaded one
// pixel per clock through a write port (wr_en, wr_n, wr_k, wr_data), written
// at the rising clock edge. Every distortion unit reads its own codevector at
// the same time, so all N*K pixels are visible at once:
//   cv  [n][k]  the whole codebook, for the K-parallel distortion units
//   col [n]     pixel rd_k of every codevector, for the K-sequential units
// Reads are combinational. The contents are not reset: they hold whatever was
// last written. The document gives the codebook's size and role; its storage
// as a loadable register file is this design's choice.
module vq_codebook
  import vq_pkg::*;
#(
  parameter int unsigned N  = 256,               // codebook size
  parameter int unsigned K  = 4,                 // vector dimension
  parameter int unsigned IW = idx_width(N),
  parameter int unsigned KW = idx_width(K)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_n,
  input  logic [KW-1:0] wr_k,
  input  pixel_t        wr_data,
  input  logic [KW-1:0] rd_k,
  output pixel_t        cv  [N][K],
  output pixel_t        col [N]
);

  pixel_t mem [N][K];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_n) < N) && (32'(wr_k) < K)) mem[wr_n][wr_k] <= wr_data;
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      for (int k = 0; k < K; k++) cv[n][k] = mem[n][k];
      col[n] = (32'(rd_k) < K) ? mem[n][rd_k] : '0;
    end
  end

endmodule
