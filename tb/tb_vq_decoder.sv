// tb_vq_decoder: checks that the decoder passes the selected (distortion,
// index) pair for every select value over random inputs.
module tb_vq_decoder;
  localparam int unsigned DW = 18, IW = 8;
  logic [DW-1:0] d [4];
  logic [IW-1:0] idx [4];
  logic [1:0]    sel;
  logic [DW-1:0] dx;
  logic [IW-1:0] ix;
  int checks = 0, failures = 0;

  vq_decoder #(.DW(DW), .IW(IW)) dut (.d(d), .idx(idx), .sel(sel), .dx(dx), .ix(ix));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) begin d[i] = DW'($urandom); idx[i] = IW'($urandom); end
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (dx !== d[s] || ix !== idx[s]) begin
          failures++; $display("FAIL sel=%0d dx=%0d ix=%0d", s, dx, ix);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
