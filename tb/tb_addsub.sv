// tb_addsub: checks the 32-bit adder/subtractor. For random and corner-case
// operands, in both modes, the sum, the carry out and the signed overflow
// flag are compared with values computed in 64-bit integer arithmetic:
// overflow is set exactly when the true signed result lies outside the
// 32-bit range.
module tb_addsub;
  logic [31:0] a, b, s;
  logic        sub, cout, ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  addsub dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout), .ovf(ovf));

  task automatic check();
    longint sa, sb, exact;
    longint unsigned ua;
    logic [31:0] nb;
    logic [32:0] uexp;
    #1;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    exact = sub ? sa - sb : sa + sb;
    ua = longint'(a);
    nb = ~b;
    uexp = sub ? 33'(ua + longint'(nb) + 1) : 33'(ua + longint'(b));
    checks++;
    if (s !== exact[31:0] || cout !== uexp[32] ||
        ovf !== (exact > 64'sd2147483647 || exact < -64'sd2147483648)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d: s=%h cout=%0d ovf=%0d", a, b, sub, s, cout, ovf);
    end
    if (ovf) n_ovf++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h7FFF_FFFF; b = 32'h1;          sub = 1'b0; check();
    a = 32'h8000_0000; b = 32'h1;          sub = 1'b1; check();
    a = 32'h0;         b = 32'h8000_0000;  sub = 1'b1; check();
    a = 32'h8000_0000; b = 32'h8000_0000;  sub = 1'b0; check();
    a = 32'h1234_5678; b = 32'h1234_5678;  sub = 1'b1; check();
    for (int k = 0; k < 4000; k++) begin
      a = $urandom; b = $urandom; sub = 1'($urandom);
      check();
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
