// smb_odd_part_tb: checks the odd slice of the S-MB recoder.
// Per digit the testbench works out, from integer sums, the half-adder carry
// c_ha = (a+b) div 2 (it must not depend on c_mid), and the signed pair
// t + c_mid = 2*c_hs - s_odd with t = (a+b) mod 2.  All 8 input combinations
// and random vectors are applied.
module smb_odd_part_tb;
  localparam int unsigned K = 8;

  logic [K-1:0] a_odd, b_odd, c_mid, s_odd, c_ha, c_hs;
  int checks = 0, failures = 0;

  smb_odd_part #(.K(K)) dut (.*);

  task automatic check();
    #1;
    for (int j = 0; j < K; j++) begin
      int ab, t, u, exp_hs, exp_s;
      ab     = int'(a_odd[j]) + int'(b_odd[j]);
      t      = ab % 2;
      u      = t + int'(c_mid[j]);
      exp_hs = (u + 1) / 2;
      exp_s  = 2 * exp_hs - u;
      checks++;
      if (int'(c_ha[j]) != ab / 2 || int'(c_hs[j]) != exp_hs || int'(s_odd[j]) != exp_s ||
          ab + int'(c_mid[j]) != 2 * int'(c_ha[j]) + 2 * int'(c_hs[j]) - int'(s_odd[j])) begin
        failures++;
        $display("FAIL digit %0d a=%b b=%b c_mid=%b -> s_odd=%b c_ha=%b c_hs=%b", j, a_odd[j],
                 b_odd[j], c_mid[j], s_odd[j], c_ha[j], c_hs[j]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      a_odd = {K{v[0]}};
      b_odd = {K{v[1]}};
      c_mid = {K{v[2]}};
      check();
    end
    for (int n = 0; n < 200; n++) begin
      a_odd = K'($urandom);
      b_odd = K'($urandom);
      c_mid = K'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
