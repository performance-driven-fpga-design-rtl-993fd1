// tb_vq_encoder_full: encodes one complete 256x256 frame with the encoder at
// its default configuration (N = 256 codevectors, 2x2 blocks of 8-bit pixels,
// distortion sequential along K), after loading a full codebook, and checks all
// 16384 indices and distortions against a full codebook search.
module tb_vq_encoder_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done;
  int checks, failures, n_stall, n_tie, n_b2b, n_frames, n_reload;

  vq_enc_harness #(.DEFAULT_TOP(1'b1), .N(256), .BH(2), .BW(2), .IMG_W(256), .IMG_H(256),
                   .PARALLEL_K(1'b0), .FRAMES(1), .GAP_PCT(2)) h (
    .clk, .rst_n, .done, .checks, .failures, .n_stall, .n_tie, .n_b2b, .n_frames, .n_reload, .min_gap());

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    $display("stalls=%0d ties=%0d back_to_back=%0d frames=%0d", n_stall, n_tie, n_b2b, n_frames);
    checks++;
    if (n_frames != 1 || n_stall == 0 || n_tie == 0 || n_b2b == 0) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
