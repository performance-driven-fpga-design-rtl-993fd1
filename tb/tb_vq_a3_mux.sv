// tb_vq_a3_mux: drives random cross differences and every A1/A2 combination
// and checks A3 against the sign of the difference between the pair winners.
module tb_vq_a3_mux;
  localparam int unsigned DW = 18;
  logic [DW:0] d_cross [4];
  logic        a1, a2, a3;
  int checks = 0, failures = 0;

  vq_a3_mux #(.DW(DW)) dut (.d_cross(d_cross), .a1(a1), .a2(a2), .a3(a3));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) d_cross[i] = (DW+1)'($urandom);
      for (int s = 0; s < 4; s++) begin
        logic [DW:0] pick;
        {a1, a2} = 2'(s);
        // the first-pair winner is D1 when a1, else D2; the second D3 when a2, else D4
        if (a1) pick = a2 ? d_cross[1] : d_cross[0];
        else    pick = a2 ? d_cross[2] : d_cross[3];
        #1;
        checks++;
        if (a3 !== pick[DW]) begin
          failures++; $display("FAIL a1=%0b a2=%0b a3=%0b", a1, a2, a3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
