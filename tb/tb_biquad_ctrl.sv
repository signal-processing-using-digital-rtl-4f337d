// tb_biquad_ctrl: checks the filter sequencer on its own. A model of the
// multiplier answers each mac_start with mac_done N+1 = 17 edges later.
// For each sample the test records, at every write-back, the step's
// operand selection, add/subtract mode and zero addend, and checks them
// against the five-step schedule (w(n-1) sub, w(n-2) sub, w(n) add from
// zero, w(n-1) add, w(n-2) add); w(n) must be stored after step 1 only, the
// output and the shift after step 4 only, and the sample must take
// 5 * 18 = 90 edges from the accepting edge to the edge that stores y(n). A sample offered while busy must be ignored.
module tb_biquad_ctrl;
  import dsp_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  x_valid = 0, mac_done = 0;
  logic  busy, load_x, mac_start, mac_sub, addend_zero, acc_we, rot, w0_we, y_we, shift;
  wsel_e wsel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  biquad_ctrl dut (.*);

  // Multiplier model: done 17 edges after the start edge.
  int cnt = -1;
  always @(posedge clk) begin
    mac_done <= 1'b0;
    if (mac_start) cnt <= 1;
    else if (cnt > 0) begin
      if (cnt == 16) begin mac_done <= 1'b1; cnt <= -1; end
      else cnt <= cnt + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam wsel_e EXP_W [5] = '{W_N1, W_N2, W_N0, W_N1, W_N2};

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 4; n++) begin
      int step, cyc, extra;
      @(negedge clk); x_valid = 1; #1;
      chk(load_x, "load_x with x_valid in idle");
      @(posedge clk); #1 x_valid = 0;
      step = 0; cyc = 0; extra = 0;
      while (step < 5 && cyc < 200) begin
        @(negedge clk);
        if (n == 1 && cyc == 30) begin
          x_valid = 1; #1 extra++;
          chk(!load_x, "sample ignored while busy");
        end
        if (acc_we) begin
          chk(wsel == EXP_W[step], $sformatf("operand at step %0d", step));
          chk(mac_sub == (step < 2), $sformatf("sub at step %0d", step));
          chk(addend_zero == (step == 2), $sformatf("zero addend at step %0d", step));
          chk(rot, "rotate with write-back");
          chk(w0_we == (step == 1), $sformatf("w0 store at step %0d", step));
          chk(y_we == (step == 4) && shift == (step == 4), $sformatf("output at step %0d", step));
          step++;
        end
        @(posedge clk); #1 x_valid = 0; cyc++;
      end
      chk(cyc == 90, $sformatf("sample took %0d cycles after the accept edge", cyc + 1));
      #1 chk(!busy, "idle after the sample");
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
