// vq_encoder_top: vector-quantisation image encoder. For every BH x BW block
// of a raster-scanned 8-bit image it finds the codevector of an N-entry
// codebook with the least squared distortion D = sum_k (x_k - c_k)^2 and
// outputs that codevector's index (and D), so that only the index needs to be
// stored or sent.
//
// Datapath: image_vectorizer -> N distortion units, one per codevector, all
// working in parallel -> vq_winner_tree (hierarchical VQ1 stages) -> index.
// PARALLEL_K selects between the two distortion architectures:
//   0 (default): parallel across N only. A vector is fed to the vq_dist_seq
//      units one dimension per clock, so one vector takes K clocks; each unit
//      has one subtractor, one squarer and one accumulator.
//   1: parallel across N and K. The whole vector enters the vq_dist_par units
//      in one clock, one vector per clock, at K subtractors and squarers and a
//      K-input adder tree per unit.
// The codebook is loaded through cb_wr_* before encoding (one pixel per clock).
// Interface: pixel stream pix_valid/pix_ready/pix; result stream idx_valid with
// idx_out, idx_dist and idx_last (last block of a frame), one clock wide, not
// back-pressured. Counted from the clock edge that accepts a block's last
// pixel, its result's idx_valid rises L edges later:
//   PARALLEL_K=0: L = 1 (feed register) + (K-1) + 3 (distortion) + log4(N)
//   PARALLEL_K=1: L = 2 + log2(K) (distortion) + log4(N)
// when no earlier block is still waiting. Results leave at most one per K
// clocks (PARALLEL_K=0) or one per BW clocks, the rate at which complete
// blocks arrive with one pixel per clock (PARALLEL_K=1).
// Architecture, codebook size N=256 and 2x2 (K=4) blocks of 8-bit pixels are
// the published configuration; the streaming interfaces, the loadable codebook
// and the image size default are this design's. Synchronous active-low reset.
// Each architecture uses only one of the codebook's two read views (column or
// whole array), so a lint tool reports the other as unused; that is expected.
module vq_encoder_top
  import vq_pkg::*;
#(
  parameter int unsigned N          = 256,       // codebook size (power of 4)
  parameter int unsigned BH         = 2,         // block rows
  parameter int unsigned BW         = 2,         // block columns
  parameter int unsigned IMG_W      = 256,       // image width
  parameter int unsigned IMG_H      = 256,       // image height
  parameter bit          PARALLEL_K = 1'b0,      // 0: parallel in N, 1: in N and K
  parameter int unsigned K          = BH * BW,   // vector dimension
  parameter int unsigned DW         = dist_width(K),
  parameter int unsigned IW         = idx_width(N),
  parameter int unsigned KW         = idx_width(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  // codebook load
  input  logic          cb_wr_en,
  input  logic [IW-1:0] cb_wr_n,
  input  logic [KW-1:0] cb_wr_k,
  input  pixel_t        cb_wr_data,
  // pixel stream
  input  logic          pix_valid,
  output logic          pix_ready,
  input  pixel_t        pix,
  // index stream
  output logic          idx_valid,
  output logic [IW-1:0] idx_out,
  output logic [DW-1:0] idx_dist,
  output logic          idx_last
);

  // ---------------- image preprocessing ----------------
  logic   vec_valid, vec_ready, vec_last;
  pixel_t vec [K];

  image_vectorizer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BH(BH), .BW(BW), .K(K)) u_vec (
    .clk, .rst_n, .pix_valid, .pix_ready, .pix,
    .vec_valid, .vec_ready, .vec, .vec_last
  );

  // ---------------- codebook ----------------
  logic [KW-1:0] rd_k;
  pixel_t        cv  [N][K];
  pixel_t        col [N];

  vq_codebook #(.N(N), .K(K), .IW(IW), .KW(KW)) u_cb (
    .clk, .wr_en(cb_wr_en), .wr_n(cb_wr_n), .wr_k(cb_wr_k), .wr_data(cb_wr_data),
    .rd_k, .cv, .col
  );

  // ---------------- distortion units ----------------
  logic          dist_valid [N];
  logic [DW-1:0] dist_d       [N];
  logic          dist_last;              // frame-end flag travelling with the vector

  if (!PARALLEL_K) begin : g_seq
    // Feed one dimension per clock: vector register plus dimension counter.
    pixel_t        xv_q [K];
    logic          busy_q, last_q;
    logic [KW-1:0] k_q;
    logic          fin_last;
    logic [2:0]    flag_pipe;            // vec_last delayed through the 3 distortion stages

    assign vec_ready = !busy_q || (32'(k_q) == K - 1);
    assign rd_k      = k_q;
    assign fin_last  = busy_q && (32'(k_q) == K - 1);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        busy_q    <= 1'b0;
        k_q       <= '0;
        last_q    <= 1'b0;
        flag_pipe <= '0;
      end else begin
        if (vec_valid && vec_ready) begin
          xv_q   <= vec;
          last_q <= vec_last;
          busy_q <= 1'b1;
          k_q    <= '0;
        end else if (busy_q) begin
          if (fin_last) busy_q <= 1'b0;
          else          k_q    <= k_q + 1'b1;
        end
        flag_pipe <= {flag_pipe[1:0], fin_last && last_q};
      end
    end

    for (genvar n = 0; n < N; n++) begin : g_unit
      vq_dist_seq #(.K(K), .DW(DW)) u_dist (
        .clk, .rst_n,
        .in_valid(busy_q), .in_first(k_q == '0), .in_last(fin_last),
        .x(xv_q[k_q]), .c(col[n]),
        .out_valid(dist_valid[n]), .distortion(dist_d[n])
      );
    end
    assign dist_last = flag_pipe[2];
  end else begin : g_par
    localparam int unsigned LAT = $clog2(K) + 2;
    logic [LAT-1:0] flag_pipe;

    assign vec_ready = 1'b1;
    assign rd_k      = '0;

    always_ff @(posedge clk) begin
      if (!rst_n) flag_pipe <= '0;
      else        flag_pipe <= {flag_pipe[LAT-2:0], vec_valid && vec_last};
    end

    for (genvar n = 0; n < N; n++) begin : g_unit
      vq_dist_par #(.K(K), .DW(DW)) u_dist (
        .clk, .rst_n,
        .in_valid(vec_valid), .x(vec), .c(cv[n]),
        .out_valid(dist_valid[n]), .distortion(dist_d[n])
      );
    end
    assign dist_last = flag_pipe[LAT-1];
  end

  // ---------------- winner search ----------------
  localparam int unsigned TL = $clog2(N) / 2;    // tree levels
  logic [TL-1:0] last_pipe;

  always_ff @(posedge clk) begin
    if (!rst_n) last_pipe <= '0;
    else if (TL > 1) last_pipe <= {last_pipe[TL-2:0], dist_last};
    else             last_pipe <= TL'(dist_last);
  end

  vq_winner_tree #(.N(N), .DW(DW), .IW(IW)) u_tree (
    .clk, .rst_n, .in_valid(dist_valid[0]), .d(dist_d),
    .out_valid(idx_valid), .out_dist(idx_dist), .out_idx(idx_out)
  );

  assign idx_last = last_pipe[TL-1] && idx_valid;

  // All distortion units run in lock step.
  for (genvar n = 1; n < N; n++) begin : g_chk
    always_ff @(posedge clk)
      if (rst_n) assert (dist_valid[n] == dist_valid[0])
        else $error("distortion unit %0d out of step", n);
  end

endmodule
