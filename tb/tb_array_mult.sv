// tb_array_mult: exhaustive check of the 4 x 4 cellular array multiplier
// (all 256 operand pairs) and a random check of an 8 x 8 instance, against
// the unsigned integer product.
module tb_array_mult;
  logic [3:0]  a, b;
  logic [7:0]  p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  array_mult          dut  (.a(a),  .b(b),  .p(p));
  array_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d*%0d gave %0d", a, b, p);
      end
    end
    for (int k = 0; k < 1000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      if (k == 0) begin a8 = 8'hFF; b8 = 8'hFF; end
      #1;
      checks++;
      if (p8 !== 16'(int'(a8) * int'(b8))) begin
        failures++;
        $display("FAIL8 %0d*%0d gave %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
