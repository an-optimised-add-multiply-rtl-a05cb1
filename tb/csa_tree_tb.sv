// csa_tree_tb: checks the carry-save array at its default size (10 operands
// of 33 bits) with random, all-ones and alternating operands: sum + carry
// must equal the sum of the operands mod 2^W.
module csa_tree_tb;
  localparam int unsigned ROWS = 10;
  localparam int unsigned W    = 33;
  localparam longint MASK = (longint'(1) << W) - 1;

  logic [ROWS-1:0][W-1:0] op;
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;

  csa_tree dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint exp;
      for (int r = 0; r < ROWS; r++) begin
        case (n % 4)
          0: op[r] = '1;
          1: op[r] = (r % 2 == 0) ? W'(33'h0aaaaaaaa) : W'(33'h155555555);
          default: op[r] = W'({$urandom, $urandom});
        endcase
      end
      #1;
      exp = 0;
      for (int r = 0; r < ROWS; r++) exp = exp + longint'(op[r]);
      exp = exp & MASK;
      checks++;
      if (((longint'(sum) + longint'(carry)) & MASK) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%h carry=%h expected total %h", sum, carry, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
