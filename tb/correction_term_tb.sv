// correction_term_tb: checks the correction row at N = 16 for all 512
// patterns of the negative-digit flags.  The expected value is built in the
// testbench with integer arithmetic:
//     ct == ( sum_j neg[j]*4^j - sum_{j=0..K} 2^(N+2j) ) mod 2^(2N+1)
module correction_term_tb;
  localparam int unsigned N = 16;
  localparam int unsigned K = N / 2;
  localparam int unsigned W = 2 * N + 1;
  localparam longint MASK = (longint'(1) << W) - 1;

  logic [K:0]   neg;
  logic [W-1:0] ct;
  int checks = 0, failures = 0;

  correction_term dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (K + 1)); v++) begin
      longint exp;
      neg = (K+1)'(v);
      #1;
      exp = 0;
      for (int j = 0; j <= K; j++) begin
        exp = exp + (longint'(neg[j]) << (2 * j));
        exp = exp - (longint'(1) << (N + 2 * j));
      end
      exp = exp & MASK;
      checks++;
      if (longint'(ct) != exp) begin
        failures++;
        $display("FAIL neg=%b ct=%h expected %h", neg, ct, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
