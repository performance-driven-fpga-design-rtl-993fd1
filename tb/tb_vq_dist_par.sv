// tb_vq_dist_par: feeds one random vector per clock (with occasional gaps)
// into the K-parallel distortion unit, for K = 4 and K = 16, and checks each
// distortion against sum (x-c)^2 and its latency of 2 + log2(K) clocks.
module tb_vq_dist_par;
  import vq_pkg::*;
  localparam int NVEC = 400;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one harness per K
  for (genvar gi = 0; gi < 2; gi++) begin : g_k
    localparam int unsigned K  = (gi == 0) ? 4 : 16;
    localparam int unsigned DW = dist_width(K);
    localparam int unsigned LAT = 2 + $clog2(K);
    logic in_valid = 0;
    pixel_t x [K], c [K];
    logic out_valid;
    logic [DW-1:0] distortion;
    longint exp_q [$];
    int     due_q [$];
    bit     done = 0;

    vq_dist_par #(.K(K)) dut (.clk, .rst_n, .in_valid, .x, .c, .out_valid, .distortion);

    always @(posedge clk) if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures += 2; $display("FAIL K=%0d unexpected output", K); end
      else begin
        longint e; int due;
        e = exp_q.pop_front(); due = due_q.pop_front();
        if (longint'(distortion) != e) begin failures++; $display("FAIL K=%0d dist=%0d exp=%0d", K, distortion, e); end
        if (cyc != due) begin failures++; $display("FAIL K=%0d latency %0d exp %0d", K, cyc, due); end
      end
    end

    initial begin
      for (int k = 0; k < K; k++) begin x[k] = 0; c[k] = 0; end
      wait (rst_n);
      @(negedge clk);
      for (int v = 0; v < NVEC; v++) begin
        longint acc;
      acc = 0;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int k = 0; k < K; k++) begin
          x[k] = pixel_t'($urandom);
          c[k] = (v % 7 == 3) ? ~x[k] : pixel_t'($urandom);
          acc += (longint'(x[k]) - longint'(c[k])) * (longint'(x[k]) - longint'(c[k]));
        end
        if (in_valid) begin exp_q.push_back(acc); due_q.push_back(cyc + LAT); end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (LAT + 3) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL K=%0d results missing", K); end
      done = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (g_k[0].done && g_k[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
