// tb_mirror_adder4: exhaustive check of the four-bit adder made of cascaded
// full adder cells: all 512 combinations of a, b and cin against the
// integer sum a + b + cin.
module tb_mirror_adder4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  mirror_adder4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      {cin, a, b} = 9'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 5'(total)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d gave %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
