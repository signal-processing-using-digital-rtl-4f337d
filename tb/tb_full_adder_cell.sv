// tb_full_adder_cell: exhaustive check of the gate-level one-bit full adder
// cell. For all eight input combinations the inverted outputs must equal the
// complement of the arithmetic sum and carry of a + b + cin.
module tb_full_adder_cell;
  logic a, b, cin, cout_n, s_n;
  int checks = 0, failures = 0;

  full_adder_cell dut (.a(a), .b(b), .cin(cin), .cout_n(cout_n), .s_n(s_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (s_n !== ~total[0] || cout_n !== ~total[1]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: s_n=%0d cout_n=%0d", a, b, cin, s_n, cout_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
