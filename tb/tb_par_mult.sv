// tb_par_mult: checks the signed parallel multiplier against the signed
// integer product at the three compared sizes: 16 bits (the default) with
// corner cases and random operands, 8 bits and 4 bits exhaustively.
module tb_par_mult;
  logic [15:0] a, b;
  logic [31:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  par_mult          dut  (.a(a),  .b(b),  .p(p));
  par_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  par_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic check();
    longint exp;
    #1;
    exp = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (p !== exp[31:0]) begin
      failures++;
      $display("FAIL %0d*%0d gave %0d", $signed(a), $signed(b), $signed(p));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    for (int v = 0; v < 65536; v++) begin
      int exp;
      {a8, b8} = 16'(v);
      #1;
      exp = int'($signed(a8)) * int'($signed(b8));
      checks++;
      if (p8 !== exp[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d*%0d gave %0d", $signed(a8), $signed(b8), $signed(p8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    a = 16'h8000; b = 16'h8000; check();
    a = 16'h7FFF; b = 16'h8000; check();
    a = 16'hFFFF; b = 16'h0001; check();
    for (int k = 0; k < 2000; k++) begin
      a = 16'($urandom); b = 16'($urandom); check();
    end
    for (int v = 0; v < 256; v++) begin
      int exp;
      {a4, b4} = 8'(v);
      #1;
      exp = int'($signed(a4)) * int'($signed(b4));
      checks++;
      if (p4 !== exp[7:0]) begin
        failures++;
        $display("FAIL4 %0d*%0d gave %0d", $signed(a4), $signed(b4), $signed(p4));
      end
    end
    for (int v = 0; v < 65536; v++) begin
      int exp;
      {a8, b8} = 16'(v);
      #1;
      exp = int'($signed(a8)) * int'($signed(b8));
      checks++;
      if (p8 !== exp[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d*%0d gave %0d", $signed(a8), $signed(b8), $signed(p8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
