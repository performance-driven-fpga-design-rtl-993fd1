// tb_vq1_select: the four-codeword winner stage against a plain minimum
// search (ties resolve to the highest position) over random and tied inputs.
module tb_vq1_select;
  localparam int unsigned DW = 18, IW = 8;
  logic [DW-1:0] d [4];
  logic [IW-1:0] idx [4];
  logic [DW-1:0] dx;
  logic [IW-1:0] ix;
  int checks = 0, failures = 0;

  vq1_select #(.DW(DW), .IW(IW)) dut (.d(d), .idx(idx), .dx(dx), .ix(ix));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best;
      for (int i = 0; i < 4; i++) begin
        d[i]   = (t % 2 == 0) ? DW'($urandom_range(0, 5)) : DW'($urandom);
        idx[i] = IW'($urandom);
      end
      best = 0;
      for (int i = 1; i < 4; i++) if (d[i] <= d[best]) best = i;
      #1;
      checks++;
      if (dx !== d[best] || ix !== idx[best]) begin
        failures++;
        $display("FAIL d=%0d %0d %0d %0d -> dx=%0d ix=%0d exp pos %0d", d[0], d[1], d[2], d[3], dx, ix, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
