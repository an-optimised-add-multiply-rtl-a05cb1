// smb_recoder_tb: checks the S-MB recoder.
// An 8-bit instance is driven with all 65536 operand pairs and a 16-bit
// (default size) instance with corner and random pairs.  For each, every
// digit must lie in -2..+2 and sum_j y_j * 4^j must equal A + B as signed
// integers.  The testbench also checks that digit j does not depend on
// operand bits above 2j+1 (the recoding does not look ahead).
module smb_recoder_tb;
  import fam_pkg::*;

  localparam int unsigned NS = 8;
  localparam int unsigned NL = 16;

  logic [NS-1:0] as, bs;
  logic [NL-1:0] al, bl;
  smb_digit_t [NS/2:0] ds;
  smb_digit_t [NL/2:0] dl;
  int checks = 0, failures = 0;

  smb_recoder #(.N(NS)) dut_s (.a(as), .b(bs), .digit(ds));
  smb_recoder dut_l (.a(al), .b(bl), .digit(dl));

  function automatic longint digits_value_s(smb_digit_t [NS/2:0] d, output bit range_ok);
    longint v = 0;
    range_ok = 1;
    for (int j = NS / 2; j >= 0; j--) begin
      int y = smb_value(d[j]);
      if (y < -2 || y > 2) range_ok = 0;
      v = v * 4 + longint'(y);
    end
    return v;
  endfunction

  function automatic longint digits_value_l(smb_digit_t [NL/2:0] d, output bit range_ok);
    longint v = 0;
    range_ok = 1;
    for (int j = NL / 2; j >= 0; j--) begin
      int y = smb_value(d[j]);
      if (y < -2 || y > 2) range_ok = 0;
      v = v * 4 + longint'(y);
    end
    return v;
  endfunction

  task automatic check_l();
    bit ok;
    longint got, exp;
    #1;
    got = digits_value_l(dl, ok);
    exp = longint'($signed(al)) + longint'($signed(bl));
    checks++;
    if (!ok || got != exp) begin
      failures++;
      $display("FAIL N=16 a=%0d b=%0d digits=%0d", $signed(al), $signed(bl), got);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    al = '0;
    bl = '0;
    // exhaustive 8-bit
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        bit ok;
        longint got, exp;
        as = 8'(i);
        bs = 8'(k);
        #1;
        got = digits_value_s(ds, ok);
        exp = longint'($signed(as)) + longint'($signed(bs));
        checks++;
        if (!ok || got != exp) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%0d b=%0d digits=%0d", $signed(as), $signed(bs), got);
        end
      end
    end
    // no look-ahead: digit j of the 8-bit instance depends only on bits 0..2j+1
    for (int n = 0; n < 2000; n++) begin
      smb_digit_t [NS/2:0] d0;
      int j;
      logic [NS-1:0] mask;
      as = NS'($urandom);
      bs = NS'($urandom);
      #1;
      d0 = ds;
      j = $urandom_range(NS / 2 - 1, 0);
      mask = ~((NS'(1) << (2 * j + 2)) - NS'(1));
      as = as ^ (NS'($urandom) & mask);
      bs = bs ^ (NS'($urandom) & mask);
      #1;
      checks++;
      if (ds[j] != d0[j]) begin
        failures++;
        $display("FAIL digit %0d changed when only higher bits changed", j);
      end
    end
    // 16-bit corners
    al = 16'h7fff; bl = 16'h7fff; check_l();
    al = 16'h8000; bl = 16'h8000; check_l();
    al = 16'h8000; bl = 16'h7fff; check_l();
    al = 16'hffff; bl = 16'h0001; check_l();
    al = 16'h0000; bl = 16'h0000; check_l();
    al = 16'haaaa; bl = 16'h5555; check_l();
    al = 16'hffff; bl = 16'hffff; check_l();
    for (int n = 0; n < 20000; n++) begin
      al = NL'($urandom);
      bl = NL'($urandom);
      check_l();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
