// cla_adder_tb: checks the carry-lookahead adder.  A 5-bit instance (width
// not a multiple of the group size) is checked for all 2048 input cases; the
// default 33-bit instance with carry-chain corners and random operands.
// {cout, sum} must equal a + b + cin.
module cla_adder_tb;
  localparam int unsigned WS = 5;
  localparam int unsigned WL = 33;

  localparam logic [WL-1:0] W_ALT = WL'(33'h0aaaaaaaa);

  logic [WS-1:0] as, bs, ss;
  logic          cs, cos;
  logic [WL-1:0] al, bl, sl;
  logic          cl, col;
  int checks = 0, failures = 0;

  cla_adder #(.W(WS)) dut_s (.a(as), .b(bs), .cin(cs), .sum(ss), .cout(cos));
  cla_adder dut_l (.a(al), .b(bl), .cin(cl), .sum(sl), .cout(col));

  task automatic check_l();
    longint exp;
    #1;
    exp = longint'(al) + longint'(bl) + longint'(cl);
    checks++;
    if ({col, sl} != (WL+1)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL W=33 a=%h b=%h cin=%b sum=%h cout=%b", al, bl, cl, sl, col);
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
    al = '0; bl = '0; cl = 0;
    for (int v = 0; v < (1 << (2 * WS + 1)); v++) begin
      {cs, bs, as} = (2*WS+1)'(v);
      #1;
      checks++;
      if (int'({cos, ss}) != int'(as) + int'(bs) + int'(cs)) begin
        failures++;
        if (failures < 10) $display("FAIL W=5 a=%0d b=%0d cin=%b sum=%0d cout=%b", as, bs, cs, ss, cos);
      end
    end
    al = '1; bl = '0; cl = 1; check_l();
    al = '1; bl = '1; cl = 1; check_l();
    al = '1; bl = WL'(1); cl = 0; check_l();
    al = W_ALT; bl = ~W_ALT; cl = 1; check_l();
    for (int n = 0; n < 20000; n++) begin
      al = WL'({$urandom, $urandom});
      bl = WL'({$urandom, $urandom});
      cl = 1'($urandom);
      if (n % 10 == 0) bl = ~al ^ WL'(1 << $urandom_range(WL - 1, 0));
      check_l();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
