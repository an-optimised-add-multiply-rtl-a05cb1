// pp_generator_tb: checks the partial product generator at N = 16.
// Every S-MB digit code (all 8 bit patterns, values -2..+2) is applied to
// every digit position with random and corner multiplicands.  For row j the
// testbench checks, mod 2^W, that
//     row[j] - 2^(N+2j) + neg[j]*4^j == y_j * X * 4^j
// i.e. that the row with its inverted sign bit, the sign constant and the
// +1 of a negated multiple together give the exact product of digit and X.
module pp_generator_tb;
  import fam_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned K = N / 2;
  localparam int unsigned W = 2 * N + 1;

  logic [N-1:0]         x;
  smb_digit_t [K:0]     digit;
  logic [K:0][W-1:0]    row;
  logic [K:0]           neg;
  int checks = 0, failures = 0;

  pp_generator dut (.*);

  localparam longint MASK = (longint'(1) << W) - 1;

  task automatic check();
    #1;
    for (int j = 0; j <= K; j++) begin
      longint got, exp;
      got = (longint'(row[j]) - (longint'(1) << (N + 2 * j)) + (longint'(neg[j]) << (2 * j))) & MASK;
      exp = (longint'(smb_value(digit[j])) * longint'($signed(x)) * (longint'(1) << (2 * j))) & MASK;
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL j=%0d digit=%b x=%0d row=%h neg=%b", j, digit[j], $signed(x), row[j], neg[j]);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      case (n % 6)
        0: x = 16'h8000;
        1: x = 16'h7fff;
        2: x = 16'hffff;
        3: x = 16'h0000;
        default: x = N'($urandom);
      endcase
      for (int j = 0; j <= K; j++) digit[j] = smb_digit_t'((n / 6 + j) % 8);
      if (n >= 600) for (int j = 0; j <= K; j++) digit[j] = smb_digit_t'($urandom_range(7, 0));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
