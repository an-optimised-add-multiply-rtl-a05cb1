// fam_top_exhaustive_tb: exhaustive test of the fused add-multiply operator
// at reduced widths.  Every combination of A, B and X is applied to a 4-bit
// instance (4096 cases) and a 6-bit instance (262144 cases); Z must equal
// X * (A + B) computed in integers.
module fam_top_exhaustive_tb;
  logic [3:0] a4, b4, x4;
  logic [8:0] z4;
  logic [5:0] a6, b6, x6;
  logic [12:0] z6;
  int checks = 0, failures = 0;

  fam_top #(.N(4)) dut4 (.a(a4), .b(b4), .x(x4), .z(z4));
  fam_top #(.N(6)) dut6 (.a(a6), .b(b6), .x(x6), .z(z6));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = '0; b6 = '0; x6 = '0;
    for (int v = 0; v < (1 << 12); v++) begin
      {x4, b4, a4} = 12'(v);
      #1;
      checks++;
      if (int'($signed(z4)) != int'($signed(x4)) * (int'($signed(a4)) + int'($signed(b4)))) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 a=%0d b=%0d x=%0d z=%0d", $signed(a4), $signed(b4),
                                    $signed(x4), $signed(z4));
      end
    end
    for (int v = 0; v < (1 << 18); v++) begin
      {x6, b6, a6} = 18'(v);
      #1;
      checks++;
      if (int'($signed(z6)) != int'($signed(x6)) * (int'($signed(a6)) + int'($signed(b6)))) begin
        failures++;
        if (failures < 10) $display("FAIL N=6 a=%0d b=%0d x=%0d z=%0d", $signed(a6), $signed(b6),
                                    $signed(x6), $signed(z6));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
