// tb_serial_mult: checks the signed serial multiplier at the three sizes the
// multipliers were compared at: 16 bits (the default) with corner cases and
// random operands, and 4 and 8 bits exhaustively or at random. Each product
// is compared with the signed integer product, and the time from the start
// edge to done is checked: done must be seen exactly N+1 clock edges after
// the edge that samples start.
module tb_serial_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // One harness per size.
  logic        st16, bz16, dn16;  logic [15:0] a16, b16;  logic [31:0] p16;
  logic        st8,  bz8,  dn8;   logic [7:0]  a8,  b8;   logic [15:0] p8;
  logic        st4,  bz4,  dn4;   logic [3:0]  a4,  b4;   logic [7:0]  p4;

  serial_mult           dut16 (.clk(clk), .rst_n(rst_n), .start(st16), .a(a16), .b(b16), .busy(bz16), .done(dn16), .p(p16));
  serial_mult #(.N(8))  dut8  (.clk(clk), .rst_n(rst_n), .start(st8),  .a(a8),  .b(b8),  .busy(bz8),  .done(dn8),  .p(p8));
  serial_mult #(.N(4))  dut4  (.clk(clk), .rst_n(rst_n), .start(st4),  .a(a4),  .b(b4),  .busy(bz4),  .done(dn4),  .p(p4));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul16(input logic [15:0] x, input logic [15:0] y);
    int cyc;
    longint exp;
    @(negedge clk); a16 = x; b16 = y; st16 = 1'b1;
    @(posedge clk); #1 st16 = 1'b0; a16 = 16'($urandom); b16 = 16'($urandom);
    cyc = 0;
    while (!dn16 && cyc < 100) begin @(posedge clk); #1 cyc++; end
    exp = longint'($signed(x)) * longint'($signed(y));
    checks++;
    if (p16 !== exp[31:0] || cyc != 16) begin
      failures++;
      $display("FAIL16 %0d*%0d gave %0d after %0d cycles", $signed(x), $signed(y), $signed(p16), cyc + 1);
    end
  endtask

  task automatic mul8(input logic [7:0] x, input logic [7:0] y);
    int cyc;
    int exp;
    @(negedge clk); a8 = x; b8 = y; st8 = 1'b1;
    @(posedge clk); #1 st8 = 1'b0;
    cyc = 0;
    while (!dn8 && cyc < 100) begin @(posedge clk); #1 cyc++; end
    exp = int'($signed(x)) * int'($signed(y));
    checks++;
    if (p8 !== exp[15:0] || cyc != 8) begin
      failures++;
      $display("FAIL8 %0d*%0d gave %0d", $signed(x), $signed(y), $signed(p8));
    end
  endtask

  task automatic mul4(input logic [3:0] x, input logic [3:0] y);
    int cyc;
    int exp;
    @(negedge clk); a4 = x; b4 = y; st4 = 1'b1;
    @(posedge clk); #1 st4 = 1'b0;
    cyc = 0;
    while (!dn4 && cyc < 100) begin @(posedge clk); #1 cyc++; end
    exp = int'($signed(x)) * int'($signed(y));
    checks++;
    if (p4 !== exp[7:0] || cyc != 4) begin
      failures++;
      $display("FAIL4 %0d*%0d gave %0d", $signed(x), $signed(y), $signed(p4));
    end
  endtask

  initial begin
    st16 = 0; st8 = 0; st4 = 0; a16 = 0; b16 = 0; a8 = 0; b8 = 0; a4 = 0; b4 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mul16(16'h8000, 16'h8000);
    mul16(16'h7FFF, 16'h8000);
    mul16(16'hFFFF, 16'hFFFF);
    mul16(16'h7FFF, 16'h7FFF);
    mul16(16'h0000, 16'h1234);
    mul16(16'h1234, 16'hFFFF);
    for (int k = 0; k < 300; k++) mul16(16'($urandom), 16'($urandom));
    for (int k = 0; k < 300; k++) mul8(8'($urandom), 8'($urandom));
    for (int v = 0; v < 256; v++) mul4(v[7:4], v[3:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
