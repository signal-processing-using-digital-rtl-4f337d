// tb_mac_unit: checks the multiplier and adder circuit at its default sizes
// (16 x 16 multiply, 32-bit add/subtract). For random operands, both
// modes, the result must be addend +/- a*c wrapped to 32 bits, with the
// overflow flag set exactly when the true result leaves the 32-bit signed
// range; done must arrive N+1 = 17 edges after the start edge.
module tb_mac_unit;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 0, sub = 0, busy, done, cout, ovf;
  logic [15:0] a = '0, c = '0;
  logic [31:0] addend = '0, res;
  int checks = 0, failures = 0, n_ovf = 0;

  always #5 clk = ~clk;

  mac_unit dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic [15:0] x, input logic [15:0] y,
                    input logic [31:0] ad, input logic sb);
    int cyc;
    longint exact;
    @(negedge clk); a = x; c = y; addend = ad; sub = sb; start = 1;
    @(posedge clk); #1 start = 0; a = 16'($urandom); c = 16'($urandom);
    cyc = 0;
    while (!done && cyc < 100) begin @(posedge clk); #1 cyc++; end
    exact = longint'($signed(x)) * longint'($signed(y));
    exact = sb ? longint'($signed(ad)) - exact : longint'($signed(ad)) + exact;
    checks++;
    if (res !== exact[31:0] || cyc != 16 ||
        ovf !== (exact > 64'sd2147483647 || exact < -64'sd2147483648)) begin
      failures++;
      $display("FAIL %h %s %h*%h: res=%h ovf=%0d cyc=%0d", ad, sb ? "-" : "+", x, y, res, ovf, cyc);
    end
    if (ovf) n_ovf++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    op(16'h7FFF, 16'h7FFF, 32'h7000_0000, 1'b0);   // positive overflow
    op(16'h7FFF, 16'h7FFF, 32'h9000_0000, 1'b1);   // negative overflow
    op(16'h8000, 16'h8000, 32'h0, 1'b1);
    for (int k = 0; k < 400; k++)
      op(16'($urandom), 16'($urandom), $urandom, 1'($urandom));
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
