// tb_vq_comparator: random and corner checks of the VQ1 subtractor bank
// against sign and difference values computed here with plain integers.
module tb_vq_comparator;
  localparam int unsigned DW = 18;
  logic [DW-1:0] d [4];
  logic          a1, a2;
  logic [DW:0]   d_cross [4];
  int checks = 0, failures = 0;

  vq_comparator #(.DW(DW)) dut (.d(d), .a1(a1), .a2(a2), .d_cross(d_cross));

  task automatic check_one();
    longint v [4];
    longint exp_x [4];
    for (int i = 0; i < 4; i++) v[i] = longint'(d[i]);
    exp_x[0] = v[0] - v[3]; exp_x[1] = v[0] - v[2];
    exp_x[2] = v[1] - v[2]; exp_x[3] = v[1] - v[3];
    #1;
    checks++;
    if (a1 !== (v[0] < v[1]) || a2 !== (v[2] < v[3])) begin
      failures++; $display("FAIL a1/a2 d=%0d %0d %0d %0d a1=%0b a2=%0b", v[0], v[1], v[2], v[3], a1, a2);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if ($signed(d_cross[i]) != exp_x[i]) begin
        failures++; $display("FAIL cross %0d got %0d exp %0d", i, $signed(d_cross[i]), exp_x[i]);
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // corners: equal values, extremes
    d = '{0, 0, 0, 0};                         check_one();
    d = '{(1<<DW)-1, 0, 0, (1<<DW)-1};         check_one();
    d = '{5, 5, 7, 7};                         check_one();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++)
        d[i] = (t % 3 == 0) ? DW'($urandom_range(0, 20)) : DW'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
