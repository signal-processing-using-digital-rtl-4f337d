// tb_truncation: checks the truncation circuit at its default sizes
// (32-bit sum, 16-bit result, 14 fraction bits). Without adder overflow the
// result must be floor(acc / 2^14) clamped to [-32768, 32767], with sat set
// exactly when clamping acted, and the partial sum passed unchanged. With
// adder overflow the sign bit of acc is wrong: the largest value of the
// opposite sign must come out on both outputs. Counts that each of the four
// saturation cases occurred.
module tb_truncation;
  logic [31:0] acc, acc_sat;
  logic        ovf, sat;
  logic [15:0] y;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_opos = 0, n_oneg = 0;

  truncation dut (.acc(acc), .ovf(ovf), .acc_sat(acc_sat), .y(y), .sat(sat));

  task automatic check();
    longint v, q, ey, eacc;
    logic   es;
    #1;
    v = longint'($signed(acc));
    if (ovf) begin
      if (v < 0) begin eacc = 64'sd2147483647;  ey = 32767;  n_opos++; end
      else       begin eacc = -64'sd2147483648; ey = -32768; n_oneg++; end
      es = 1'b1;
    end else begin
      eacc = v;
      q = v >>> 14;
      es = 1'b0;
      ey = q;
      if (q > 32767)  begin ey = 32767;  es = 1'b1; n_pos++; end
      if (q < -32768) begin ey = -32768; es = 1'b1; n_neg++; end
    end
    checks++;
    if (y !== ey[15:0] || acc_sat !== eacc[31:0] || sat !== es) begin
      failures++;
      $display("FAIL acc=%h ovf=%0d: y=%h acc_sat=%h sat=%0d", acc, ovf, y, acc_sat, sat);
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
    acc = 32'h1FFF_FFFF; ovf = 0; check();   // largest in range
    acc = 32'h2000_0000; ovf = 0; check();   // just above
    acc = 32'hE000_0000; ovf = 0; check();   // most negative in range
    acc = 32'hDFFF_FFFF; ovf = 0; check();   // just below
    acc = 32'hFFFF_FFFF; ovf = 0; check();   // -1 LSB truncates to -1
    acc = 32'h8000_0001; ovf = 1; check();
    acc = 32'h7FFF_0000; ovf = 1; check();
    for (int k = 0; k < 4000; k++) begin
      acc = $urandom;
      if (k % 2 == 0) acc = 32'($signed(acc) >>> ($urandom % 8));
      ovf = ($urandom % 8) == 0;
      check();
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_opos == 0 || n_oneg == 0) begin
      failures++;
      $display("FAIL a saturation case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
