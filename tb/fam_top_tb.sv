// fam_top_tb: end-to-end test of the fused add-multiply operator at its
// default size (N = 16, Z of 33 bits).
// Z is compared with X * (A + B) computed in 64-bit integers for corner
// operands (most negative, most positive, -1, 0, alternating bits) and for
// random operands.  The testbench also counts how often each mechanism of
// the datapath was exercised and fails if one never was:
//   * every MB digit value -2, -1, 0, +1, +2;
//   * the zero digit coded as (1,1,1), which must not produce a negated row;
//   * A + B outside the N-bit range, which only the extra top digit carries;
//   * a non-zero top digit;
//   * a negative top digit, whose +1 meets the sign constant at bit N of CT.
module fam_top_tb;
  import fam_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned K = N / 2;

  logic [N-1:0] a, b, x;
  logic [2*N:0] z;
  int checks = 0, failures = 0;
  int n_digit [5];
  int n_neg_zero = 0, n_sum_ovf = 0, n_top_nz = 0, n_top_neg = 0;

  fam_top dut (.*);

  localparam logic [N-1:0] CORNER [6] = '{16'h8000, 16'h7fff, 16'hffff, 16'h0000, 16'haaaa, 16'h5555};

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv, logic [N-1:0] xv);
    longint s, exp;
    a = av;
    b = bv;
    x = xv;
    #1;
    s   = longint'($signed(a)) + longint'($signed(b));
    exp = longint'($signed(x)) * s;
    checks++;
    if (longint'($signed(z)) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d x=%0d z=%0d expected %0d", $signed(a), $signed(b),
                                  $signed(x), $signed(z), exp);
    end
    // coverage of the mechanisms
    for (int j = 0; j <= K; j++) begin
      int y = smb_value(dut.digit[j]);
      if (y >= -2 && y <= 2) n_digit[y+2]++;
      if (dut.digit[j] == 3'b111) begin
        n_neg_zero++;
        checks++;
        if (dut.neg[j]) begin
          failures++;
          $display("FAIL zero digit %0d produced a negated row", j);
        end
      end
    end
    if (s > longint'(2 ** (N - 1) - 1) || s < -longint'(2 ** (N - 1))) n_sum_ovf++;
    if (smb_value(dut.digit[K]) != 0) n_top_nz++;
    if (dut.neg[K]) n_top_neg++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    foreach (CORNER[i])
      foreach (CORNER[k])
        foreach (CORNER[m]) apply(CORNER[i], CORNER[k], CORNER[m]);
    for (int n = 0; n < 100000; n++) apply(N'($urandom), N'($urandom), N'($urandom));
    $display("digit counts -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d", n_digit[0], n_digit[1], n_digit[2],
             n_digit[3], n_digit[4]);
    $display("zero coded 111:%0d  sum beyond N bits:%0d  top digit non-zero:%0d  top digit negative:%0d",
             n_neg_zero, n_sum_ovf, n_top_nz, n_top_neg);
    foreach (n_digit[i]) begin
      checks++;
      if (n_digit[i] == 0) begin
        failures++;
        $display("FAIL digit value %0d never occurred", i - 2);
      end
    end
    checks += 4;
    if (n_neg_zero == 0) begin failures++; $display("FAIL zero digit coded 111 never occurred"); end
    if (n_sum_ovf == 0)  begin failures++; $display("FAIL A+B never left the N-bit range"); end
    if (n_top_nz == 0)   begin failures++; $display("FAIL top digit never non-zero"); end
    if (n_top_neg == 0)  begin failures++; $display("FAIL top digit never negative"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
