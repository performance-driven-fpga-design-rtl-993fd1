// tb_vq_index_lut: applies every distinct ordering pattern of four
// distortions, derives A1..A3 from them as the comparator and mux would, and
// checks the LUT's position points at a least distortion (the later one on a
// tie between the two compared values).
module tb_vq_index_lut;
  logic       a1, a2, a3;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  vq_index_lut dut (.a1(a1), .a2(a2), .a3(a3), .sel(sel));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v [4];
    int w12, w34, expi;
    // all 4^4 assignments of values 0..3 to D1..D4
    for (int code = 0; code < 256; code++) begin
      for (int i = 0; i < 4; i++) v[i] = (code >> (2*i)) & 3;
      a1 = v[0] < v[1];
      a2 = v[2] < v[3];
      w12 = a1 ? 0 : 1;
      w34 = a2 ? 2 : 3;
      a3 = v[w12] < v[w34];
      expi = a3 ? w12 : w34;
      #1;
      checks++;
      if (int'(sel) != expi) begin
        failures++; $display("FAIL v=%0d %0d %0d %0d sel=%0d exp=%0d", v[0], v[1], v[2], v[3], sel, expi);
      end
      // the chosen value must be a minimum
      checks++;
      for (int i = 0; i < 4; i++)
        if (v[i] < v[sel]) begin failures++; $display("FAIL not minimal, code=%0d", code); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
