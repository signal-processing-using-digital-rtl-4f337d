// tb_cla_adder: checks the 16-bit carry lookahead adder against the integer
// sum a + b + cin, with the carry-propagating corner cases (all ones plus a
// carry in, alternating patterns) followed by random operands. An 8-bit
// instance is checked exhaustively.
module tb_cla_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  int checks = 0, failures = 0;

  cla_adder          dut  (.a(a),  .b(b),  .cin(cin),  .s(s),  .cout(cout));
  cla_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic check16();
    #1;
    checks++;
    if ({cout, s} !== 17'(int'(a) + int'(b) + int'(cin))) begin
      failures++;
      $display("FAIL %h+%h+%0d gave %h", a, b, cin, {cout, s});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; cin8 = 1'b0;
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; check16();
    a = 16'hAAAA; b = 16'h5555; cin = 1'b1; check16();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check16();
    a = 16'h0F0F; b = 16'h00F1; cin = 1'b0; check16();
    for (int k = 0; k < 3000; k++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      check16();
    end
    for (int v = 0; v < 131072; v++) begin
      {cin8, a8, b8} = 17'(v);
      #1;
      checks++;
      if ({cout8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin8))) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %h+%h+%0d gave %h", a8, b8, cin8, {cout8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
