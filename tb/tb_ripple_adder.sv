// tb_ripple_adder: exhaustive check of the 4-bit ripple carry adder (all
// 512 input combinations) and a random check of a 16-bit instance, both
// against the integer sum a + b + cin.
module tb_ripple_adder;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        c4, co4, c16, co16;
  int checks = 0, failures = 0;

  ripple_adder             dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .cout(co4));
  ripple_adder #(.W(16))   dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; c16 = 1'b0;
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d gave %0d", a4, b4, c4, {co4, s4});
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (k == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; c16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} !== 17'(int'(a16) + int'(b16) + int'(c16))) begin
        failures++;
        $display("FAIL 16-bit %0d+%0d+%0d gave %0d", a16, b16, c16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
