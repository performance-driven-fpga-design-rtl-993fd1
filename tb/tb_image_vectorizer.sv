// tb_image_vectorizer: streams two frames of a random image through the
// block vectoriser, for 2x2 blocks on a 16x8 image and 4x4 blocks on a 16x16
// image, with random gaps on the pixel input and random back-pressure on the
// vector output, and checks every vector, the block order, the frame-end flag
// and that the input stalled while a vector waited.
module tb_image_vectorizer;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_cfg
    localparam int unsigned IMG_W = 16;
    localparam int unsigned IMG_H = (gi == 0) ? 8 : 16;
    localparam int unsigned BH = (gi == 0) ? 2 : 4;
    localparam int unsigned BW = (gi == 0) ? 2 : 4;
    localparam int unsigned K = BH * BW;
    localparam int FRAMES = 2;
    localparam int NBLK = (IMG_W / BW) * (IMG_H / BH);

    logic pix_valid = 0, pix_ready, vec_valid, vec_ready = 0, vec_last;
    pixel_t pix = 0;
    pixel_t vec [K];
    pixel_t img [FRAMES][IMG_H][IMG_W];
    int nvec = 0, stalls = 0;
    bit done = 0;

    image_vectorizer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BH(BH), .BW(BW)) dut (.*);

    // output side: random ready, check each accepted vector
    always @(posedge clk) begin
      if (rst_n) vec_ready <= ($urandom_range(0, 3) != 0);
      if (rst_n && pix_valid && !pix_ready) stalls++;
      if (rst_n && vec_valid && vec_ready) begin
        int f, b, br, bc;
        f  = nvec / NBLK;
        b  = nvec % NBLK;
        br = b / (IMG_W / BW);
        bc = b % (IMG_W / BW);
        for (int r = 0; r < BH; r++)
          for (int c = 0; c < BW; c++) begin
            checks++;
            if (vec[r*BW+c] !== img[f % FRAMES][br*BH+r][bc*BW+c]) begin
              failures++;
              $display("FAIL cfg%0d vec %0d elem %0d got %0h exp %0h", gi, nvec, r*BW+c,
                       vec[r*BW+c], img[f % FRAMES][br*BH+r][bc*BW+c]);
            end
          end
        checks++;
        if (vec_last !== (b == NBLK - 1)) begin failures++; $display("FAIL cfg%0d vec_last at %0d", gi, nvec); end
        nvec++;
      end
    end

    initial begin
      for (int f = 0; f < FRAMES; f++)
        for (int r = 0; r < IMG_H; r++)
          for (int c = 0; c < IMG_W; c++) img[f][r][c] = pixel_t'($urandom);
      wait (rst_n);
      @(negedge clk);
      for (int f = 0; f < FRAMES; f++)
        for (int r = 0; r < IMG_H; r++)
          for (int c = 0; c < IMG_W; c++) begin
            while ($urandom_range(0, 4) == 0) begin pix_valid = 0; @(negedge clk); end
            pix_valid = 1; pix = img[f][r][c];
            @(posedge clk);
            while (!pix_ready) @(posedge clk);
            @(negedge clk);
          end
      pix_valid = 0;
      repeat (20) @(negedge clk);
      checks += 2;
      if (nvec != FRAMES * NBLK) begin failures++; $display("FAIL cfg%0d got %0d vectors exp %0d", gi, nvec, FRAMES*NBLK); end
      if (stalls == 0) begin failures++; $display("FAIL cfg%0d input never stalled", gi); end
      done = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (g_cfg[0].done && g_cfg[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
