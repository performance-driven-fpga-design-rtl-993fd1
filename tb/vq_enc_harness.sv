// vq_enc_harness: end-to-end test harness for vq_encoder_top.
//
// Loads a random codebook (every eighth codevector duplicates its neighbour,
// so equal distortions occur), builds each frame from blocks that are
// codevectors plus small noise (one block in four fully random), streams the
// frame's pixels with random input gaps, and checks every output against a
// full search over the codebook done here: index (ties to the highest index),
// distortion, order, frame-end flag and latency. Between frames the codebook
// is reloaded with new contents. It counts the mechanisms a run exercises:
// input stalls, ties, back-to-back results, frames and codebook reloads.
// With DEFAULT_TOP = 1 the encoder is instantiated with no parameter list, so
// it runs at its own defaults; the harness parameters must then equal them.
module vq_enc_harness
  import vq_pkg::*;
#(
  parameter bit          DEFAULT_TOP = 1'b0,
  parameter int unsigned N           = 16,
  parameter int unsigned BH          = 2,
  parameter int unsigned BW          = 2,
  parameter int unsigned IMG_W       = 16,
  parameter int unsigned IMG_H       = 8,
  parameter bit          PARALLEL_K  = 1'b0,
  parameter int unsigned FRAMES      = 2,
  parameter int unsigned GAP_PCT     = 10       // chance of an idle input clock, in percent
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,     // clocks the encoder held off the pixel input
  output int   n_tie,       // blocks with more than one nearest codevector
  output int   n_b2b,       // results at the architecture's shortest spacing
  output int   n_frames,
  output int   n_reload,
  output int   min_gap      // fewest clocks seen between two results
);
  localparam int unsigned K   = BH * BW;
  localparam int unsigned DW  = dist_width(K);
  localparam int unsigned IW  = idx_width(N);
  localparam int unsigned KW  = idx_width(K);
  localparam int unsigned TL  = $clog2(N) / 2;
  localparam int unsigned LAT = PARALLEL_K ? (2 + $clog2(K) + TL) : (K + 3 + TL);
  localparam int unsigned GAP = PARALLEL_K ? BW : K;     // shortest result spacing
  localparam int NBLK = (IMG_W / BW) * (IMG_H / BH);

  logic          cb_wr_en = 0;
  logic [IW-1:0] cb_wr_n = 0;
  logic [KW-1:0] cb_wr_k = 0;
  pixel_t        cb_wr_data = 0;
  logic          pix_valid = 0, pix_ready;
  pixel_t        pix = 0;
  logic          idx_valid, idx_last;
  logic [IW-1:0] idx_out;
  logic [DW-1:0] idx_dist;

  if (DEFAULT_TOP) begin : g_def
    vq_encoder_top dut (.*);
  end else begin : g_par
    vq_encoder_top #(.N(N), .BH(BH), .BW(BW), .IMG_W(IMG_W), .IMG_H(IMG_H),
                     .PARALLEL_K(PARALLEL_K)) dut (.*);
  end

  pixel_t cb  [N][K];
  pixel_t img [IMG_H][IMG_W];
  int     exp_idx [$];
  int     exp_dst [$];
  int     acc_cyc [$];      // cycle at which each block's last pixel was accepted
  int     cyc = 0, last_out = -1000;
  bit     idle_before [$];  // block started after the encoder was idle

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- output checker ----------------
  int nout = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_valid && !pix_ready) n_stall++;
    if (idx_valid) begin
      checks += 4;
      if (exp_idx.size() == 0) begin
        failures += 4; $display("FAIL unexpected result");
      end else begin
        int ei, ed, ac, lat;
        bit idle;
        ei = exp_idx.pop_front(); ed = exp_dst.pop_front();
        ac = acc_cyc.pop_front(); idle = idle_before.pop_front();
        lat = cyc - ac - 1;
        if (int'(idx_out) != ei) begin failures++; $display("FAIL block %0d idx=%0d exp %0d", nout, idx_out, ei); end
        if (int'(idx_dist) != ed) begin failures++; $display("FAIL block %0d dist=%0d exp %0d", nout, idx_dist, ed); end
        if (idx_last !== ((nout % NBLK) == NBLK - 1)) begin failures++; $display("FAIL block %0d idx_last=%0b", nout, idx_last); end
        // latency is exact when nothing was queued ahead, never shorter
        if (idle ? (lat != int'(LAT)) : (lat < int'(LAT))) begin
          failures++; $display("FAIL block %0d latency %0d expected %0d", nout, lat, LAT);
        end
        if (cyc - last_out < int'(GAP)) begin
          failures++; $display("FAIL results %0d clocks apart, minimum %0d", cyc - last_out, GAP);
        end
        if (cyc - last_out == int'(GAP)) n_b2b++;
        if (cyc - last_out < min_gap) min_gap = cyc - last_out;
      end
      last_out = cyc;
      nout++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic load_codebook();
    for (int n = 0; n < int'(N); n++)
      for (int k = 0; k < int'(K); k++)
        cb[n][k] = (n % 8 == 7) ? cb[n-1][k] : pixel_t'($urandom);
    for (int n = 0; n < int'(N); n++)
      for (int k = 0; k < int'(K); k++) begin
        cb_wr_en = 1; cb_wr_n = IW'(n); cb_wr_k = KW'(k); cb_wr_data = cb[n][k];
        @(negedge clk);
      end
    cb_wr_en = 0;
  endtask

  task automatic make_frame();
    for (int br = 0; br < int'(IMG_H / BH); br++)
      for (int bc = 0; bc < int'(IMG_W / BW); bc++) begin
        int src, v;
        bit rnd;
        src = $urandom_range(0, N - 1);
        rnd = ($urandom_range(0, 3) == 0);
        for (int r = 0; r < int'(BH); r++)
          for (int c = 0; c < int'(BW); c++) begin
            v = rnd ? int'($urandom_range(0, 255))
                    : int'(cb[src][r*BW+c]) + int'($urandom_range(0, 4)) - 2;
            img[br*BH+r][bc*BW+c] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
          end
      end
    // expected results, block order = raster order of blocks
    for (int br = 0; br < int'(IMG_H / BH); br++)
      for (int bc = 0; bc < int'(IMG_W / BW); bc++) begin
        int best, bestd, nbest;
        best = 0; bestd = 1 << 30; nbest = 0;
        for (int n = 0; n < int'(N); n++) begin
          int dd;
          dd = 0;
          for (int r = 0; r < int'(BH); r++)
            for (int c = 0; c < int'(BW); c++) begin
              int e;
              e = int'(img[br*BH+r][bc*BW+c]) - int'(cb[n][r*BW+c]);
              dd += e * e;
            end
          if (dd < bestd) begin bestd = dd; best = n; nbest = 1; end
          else if (dd == bestd) begin best = n; nbest++; end
        end
        if (nbest > 1) n_tie++;
        exp_idx.push_back(best);
        exp_dst.push_back(bestd);
      end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_stall = 0; n_tie = 0; n_b2b = 0; n_frames = 0; n_reload = 0;
    min_gap = 1 << 30;
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < int'(FRAMES); f++) begin
      load_codebook();
      if (f > 0) n_reload++;
      make_frame();
      for (int r = 0; r < int'(IMG_H); r++)
        for (int c = 0; c < int'(IMG_W); c++) begin
          bit was_idle;
          while ($urandom_range(0, 99) < GAP_PCT) begin pix_valid = 0; @(negedge clk); end
          pix_valid = 1; pix = img[r][c];
          // the encoder is idle when every earlier block has produced its result
          was_idle = (acc_cyc.size() == 0);
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
          if ((r % BH) == BH - 1 && (c % BW) == BW - 1) begin
            acc_cyc.push_back(cyc);
            idle_before.push_back(was_idle);
          end
          @(negedge clk);
        end
      pix_valid = 0;
      // let the frame drain before the codebook changes
      while (exp_idx.size() != 0) @(negedge clk);
      repeat (3) @(negedge clk);
      n_frames++;
    end
    done = 1;
  end

endmodule
