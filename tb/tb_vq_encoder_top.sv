// tb_vq_encoder_top: end-to-end test of the encoder at reduced sizes. Two
// encoders side by side, one per distortion architecture (sequential along K
// with N = 16, and parallel along K with N = 64 and 4x4 blocks), each encode
// three frames with a codebook reload between frames; a third runs the main
// configuration N = 256 with 2x2 blocks and the K-parallel units for two frames. Every result is checked
// against a full codebook search; the test fails if a run shows no input
// stall (sequential), no tie, no back-to-back results, or no reload.
module tb_vq_encoder_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int c0, f0, s0, t0, b0, fr0, r0;
  int c1, f1, s1, t1, b1, fr1, r1;
  int c2, f2, s2, t2, b2, fr2, r2;
  int checks, failures;

  vq_enc_harness #(.N(16), .BH(2), .BW(2), .IMG_W(16), .IMG_H(8), .PARALLEL_K(1'b0),
                   .FRAMES(3), .GAP_PCT(10)) h_seq (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .n_stall(s0), .n_tie(t0),
    .n_b2b(b0), .n_frames(fr0), .n_reload(r0), .min_gap());

  vq_enc_harness #(.N(64), .BH(4), .BW(4), .IMG_W(32), .IMG_H(16), .PARALLEL_K(1'b1),
                   .FRAMES(3), .GAP_PCT(0)) h_par (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .n_stall(s1), .n_tie(t1),
    .n_b2b(b1), .n_frames(fr1), .n_reload(r1), .min_gap());

  // the main configuration (N = 256, 2x2 blocks) with the K-parallel units
  vq_enc_harness #(.N(256), .BH(2), .BW(2), .IMG_W(32), .IMG_H(16), .PARALLEL_K(1'b1),
                   .FRAMES(2), .GAP_PCT(5)) h_par256 (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .n_stall(s2), .n_tie(t2),
    .n_b2b(b2), .n_frames(fr2), .n_reload(r2), .min_gap());

  task automatic report();
    checks = c0 + c1 + c2 + 6;
    failures = f0 + f1 + f2;
    $display("sequential-K: stalls=%0d ties=%0d back_to_back=%0d frames=%0d reloads=%0d", s0, t0, b0, fr0, r0);
    $display("parallel-K:   stalls=%0d ties=%0d back_to_back=%0d frames=%0d reloads=%0d", s1, t1, b1, fr1, r1);
    $display("parallel-K, N=256: stalls=%0d ties=%0d back_to_back=%0d frames=%0d reloads=%0d", s2, t2, b2, fr2, r2);
    if (s0 == 0) begin failures++; $display("FAIL sequential-K input never stalled"); end
    if (s1 != 0 || s2 != 0) begin failures++; $display("FAIL parallel-K input stalled"); end
    if (t0 == 0 || t1 == 0 || t2 == 0) begin failures++; $display("FAIL no tie exercised"); end
    if (b0 == 0 || b1 == 0 || b2 == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (r0 == 0 || r1 == 0 || r2 == 0) begin failures++; $display("FAIL no codebook reload"); end
    if (fr0 != 3 || fr1 != 3 || fr2 != 2) begin failures++; $display("FAIL frames incomplete"); end
  endtask

  initial begin
    #5000000;
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!(d0 && d1 && d2)) @(negedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
