// tb_cla4: exhaustive check of the 4-bit carry lookahead group. For all 512
// input combinations: the sum bits equal the low four bits of a + b + cin;
// the group generate equals the carry out of a + b with cin = 0; the group
// propagate is high exactly when a + b = 15 (a carry in would pass through).
module tb_cla4;
  logic [3:0] a, b, s;
  logic       cin, gp, gg;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .s(s), .grp_p(gp), .grp_g(gg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sum0;
      {cin, a, b} = 9'(v);
      #1;
      sum0 = int'(a) + int'(b);
      checks++;
      if (s !== 4'(sum0 + int'(cin)) || gg !== (sum0 > 15) || gp !== (sum0 == 15)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: s=%0d P=%0d G=%0d", a, b, cin, s, gp, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
