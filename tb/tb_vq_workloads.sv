// tb_vq_workloads: runs the encoder in the configurations whose timing is
// compared between the two architectures: a four-codeword codebook (N = 4)
// with vectors of K = 2 (1x2 blocks), 4 (2x2), 8 (2x4) and 16 (4x4) dimensions,
// each with the distortion sequential along K and parallel along K, plus the
// N = 16, K = 2 configuration. Every result is checked against a full search,
// with the latency each architecture should have; the clocks per vector and
// the latency of each configuration are printed (a parallel-K encoder is fed
// one pixel per clock, so its results are at least BW clocks apart), showing the sequential
// architecture's time growing with K and the parallel one's staying nearly flat.
module tb_vq_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 9;
  //                               K=2 K=4 K=8 K=16 ...
  localparam int CFG_BH [NCFG] = '{1, 2, 2, 4, 1, 2, 2, 4, 1};
  localparam int CFG_BW [NCFG] = '{2, 2, 4, 4, 2, 2, 4, 4, 2};
  localparam int CFG_PK [NCFG] = '{0, 0, 0, 0, 1, 1, 1, 1, 0};
  localparam int CFG_N  [NCFG] = '{4, 4, 4, 4, 4, 4, 4, 4, 16};

  logic done [NCFG];
  int c [NCFG], f [NCFG], s [NCFG], t [NCFG], b [NCFG], fr [NCFG], r [NCFG], g [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    vq_enc_harness #(.N(CFG_N[i]), .BH(CFG_BH[i]), .BW(CFG_BW[i]), .IMG_W(16), .IMG_H(8),
                     .PARALLEL_K(CFG_PK[i] != 0), .FRAMES(2), .GAP_PCT(5)) h (
      .clk, .rst_n, .done(done[i]), .checks(c[i]), .failures(f[i]), .n_stall(s[i]),
      .n_tie(t[i]), .n_b2b(b[i]), .n_frames(fr[i]), .n_reload(r[i]), .min_gap(g[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NCFG; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic finish_run(input bit timeout);
    int checks, failures;
    checks = 0; failures = timeout ? 1 : 0;
    for (int i = 0; i < NCFG; i++) begin
      int k, tl, lat;
      k  = CFG_BH[i] * CFG_BW[i];
      tl = $clog2(CFG_N[i]) / 2;
      lat = CFG_PK[i] ? (2 + $clog2(k) + tl) : (k + 3 + tl);
      $display("N=%0d K=%0d %s: fewest clocks between results=%0d latency=%0d frames=%0d",
               CFG_N[i], k, CFG_PK[i] ? "parallel-K  " : "sequential-K", g[i], lat, fr[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (fr[i] != 2) begin failures++; $display("FAIL configuration %0d incomplete", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #5000000;
    $display("watchdog expired");
    finish_run(1'b1);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(negedge clk);
    finish_run(1'b0);
  end
endmodule
