// smb_even_part_tb: checks the even slice of the S-MB recoder.
// For every digit the arithmetic identity a + b + c_in = 2*c_mid + s_even is
// checked against sums formed in the testbench, first for all 8 input
// combinations on every digit at once, then on random vectors.
module smb_even_part_tb;
  localparam int unsigned K = 8;

  logic [K-1:0] a_even, b_even, c_in, s_even, c_mid;
  int checks = 0, failures = 0;

  smb_even_part #(.K(K)) dut (.*);

  task automatic check();
    #1;
    for (int j = 0; j < K; j++) begin
      int tot;
      tot = int'(a_even[j]) + int'(b_even[j]) + int'(c_in[j]);
      checks++;
      if (int'(s_even[j]) != tot % 2 || int'(c_mid[j]) != tot / 2) begin
        failures++;
        $display("FAIL digit %0d a=%b b=%b c=%b -> s=%b c_mid=%b", j, a_even[j], b_even[j],
                 c_in[j], s_even[j], c_mid[j]);
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
      a_even = {K{v[0]}};
      b_even = {K{v[1]}};
      c_in   = {K{v[2]}};
      check();
    end
    for (int n = 0; n < 200; n++) begin
      a_even = K'($urandom);
      b_even = K'($urandom);
      c_in   = K'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
