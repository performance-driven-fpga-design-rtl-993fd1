// tb_vq_codebook: writes a codebook in random order, then checks every entry
// through both read views (whole array and one column at a time), and that an
// overwrite changes only its own entry.
module tb_vq_codebook;
  import vq_pkg::*;
  localparam int unsigned N = 16, K = 4;
  localparam int unsigned IW = idx_width(N), KW = idx_width(K);
  logic clk = 0;
  logic wr_en = 0;
  logic [IW-1:0] wr_n = 0;
  logic [KW-1:0] wr_k = 0, rd_k = 0;
  pixel_t wr_data = 0;
  pixel_t cv [N][K];
  pixel_t col [N];
  pixel_t ref_m [N][K];
  int checks = 0, failures = 0;

  vq_codebook #(.N(N), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_all();
    for (int k = 0; k < K; k++) begin
      rd_k = KW'(k);
      #1;
      for (int n = 0; n < N; n++) begin
        checks += 2;
        if (cv[n][k] !== ref_m[n][k]) begin failures++; $display("FAIL cv[%0d][%0d]=%0h exp %0h", n, k, cv[n][k], ref_m[n][k]); end
        if (col[n] !== ref_m[n][k])   begin failures++; $display("FAIL col[%0d] k=%0d =%0h exp %0h", n, k, col[n], ref_m[n][k]); end
      end
    end
  endtask

  initial begin
    @(negedge clk);
    // fill in descending order with random data
    for (int n = N - 1; n >= 0; n--)
      for (int k = K - 1; k >= 0; k--) begin
        wr_en = 1; wr_n = IW'(n); wr_k = KW'(k); wr_data = pixel_t'($urandom);
        ref_m[n][k] = wr_data;
        @(negedge clk);
      end
    wr_en = 0;
    check_all();
    // random overwrites
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      wr_en = 1; wr_n = IW'($urandom_range(0, N-1)); wr_k = KW'($urandom_range(0, K-1));
      wr_data = pixel_t'($urandom);
      ref_m[wr_n][wr_k] = wr_data;
      @(negedge clk);
      wr_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
