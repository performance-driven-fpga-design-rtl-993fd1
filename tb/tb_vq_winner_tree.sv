// tb_vq_winner_tree: feeds one set of N random distortions per clock (with
// gaps) into the hierarchical winner search, for N = 4, 16 and 256, and checks
// each winner against a plain minimum search (ties to the highest index) and
// its latency of log4(N) clocks.
module tb_vq_winner_tree;
  import vq_pkg::*;
  localparam int NSET = 300;
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

  for (genvar gi = 0; gi < 3; gi++) begin : g_n
    localparam int unsigned N  = (gi == 0) ? 4 : (gi == 1) ? 16 : 256;
    localparam int unsigned DW = dist_width(4);
    localparam int unsigned IW = idx_width(N);
    localparam int unsigned LAT = $clog2(N) / 2;
    logic in_valid = 0;
    logic [DW-1:0] d [N];
    logic out_valid;
    logic [DW-1:0] out_dist;
    logic [IW-1:0] out_idx;
    int exp_i [$];
    int exp_d [$];
    int due_q [$];
    bit done = 0;

    vq_winner_tree #(.N(N), .DW(DW)) dut (.clk, .rst_n, .in_valid, .d, .out_valid, .out_dist, .out_idx);

    always @(posedge clk) if (rst_n && out_valid) begin
      checks += 3;
      if (exp_i.size() == 0) begin failures += 3; $display("FAIL N=%0d unexpected output", N); end
      else begin
        int ei, ed, due;
        ei = exp_i.pop_front(); ed = exp_d.pop_front(); due = due_q.pop_front();
        if (int'(out_idx) != ei)  begin failures++; $display("FAIL N=%0d idx=%0d exp %0d", N, out_idx, ei); end
        if (int'(out_dist) != ed) begin failures++; $display("FAIL N=%0d dist=%0d exp %0d", N, out_dist, ed); end
        if (cyc != due)           begin failures++; $display("FAIL N=%0d latency %0d exp %0d", N, cyc, due); end
      end
    end

    initial begin
      for (int i = 0; i < N; i++) d[i] = '0;
      wait (rst_n);
      @(negedge clk);
      for (int s = 0; s < NSET; s++) begin
        int best;
        in_valid = ($urandom_range(0, 5) != 0);
        for (int i = 0; i < N; i++)
          d[i] = (s % 3 == 0) ? DW'($urandom_range(0, 3)) : DW'($urandom_range(0, 260100));
        best = 0;
        for (int i = 1; i < N; i++) if (d[i] <= d[best]) best = i;
        if (in_valid) begin exp_i.push_back(best); exp_d.push_back(int'(d[best])); due_q.push_back(cyc + LAT); end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (LAT + 3) @(negedge clk);
      checks++;
      if (exp_i.size() != 0) begin failures++; $display("FAIL N=%0d results missing", N); end
      done = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (g_n[0].done && g_n[1].done && g_n[2].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
