// tb_vq_dist_seq: streams random vectors (back to back and with gaps) one
// dimension per clock into the sequential distortion unit and checks each
// result against sum (x-c)^2 computed here, and that it appears exactly three
// clocks after the vector's last dimension.
module tb_vq_dist_seq;
  import vq_pkg::*;
  localparam int unsigned K = 4;
  localparam int unsigned DW = dist_width(K);
  localparam int NVEC = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last;
  pixel_t x, c;
  logic out_valid;
  logic [DW-1:0] distortion;
  int checks = 0, failures = 0;
  int cyc = 0;

  vq_dist_seq #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint exp_q [$];
  int     due_q [$];

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (exp_q.size() == 0) begin failures += 2; $display("FAIL unexpected output"); end
    else begin
      longint e; int due;
      e = exp_q.pop_front(); due = due_q.pop_front();
      if (longint'(distortion) != e) begin failures++; $display("FAIL dist=%0d exp=%0d", distortion, e); end
      if (cyc != due) begin failures++; $display("FAIL latency: cycle %0d expected %0d", cyc, due); end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; x = 0; c = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NVEC; v++) begin
      longint acc;
      acc = 0;
      if (v % 5 == 4) begin
        in_valid = 0; in_first = 0; in_last = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      for (int k = 0; k < K; k++) begin
        case (v % 4)
          0: begin x = pixel_t'($urandom); c = pixel_t'($urandom); end
          1: begin x = 8'hFF; c = 8'h00; end           // largest distortion
          2: begin x = 8'h00; c = 8'hFF; end
          default: begin x = pixel_t'($urandom); c = x; end
        endcase
        acc += (longint'(x) - longint'(c)) * (longint'(x) - longint'(c));
        in_valid = 1; in_first = (k == 0); in_last = (k == K - 1);
        if (k == K - 1) begin exp_q.push_back(acc); due_q.push_back(cyc + 3); end
        @(negedge clk);
      end
    end
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
