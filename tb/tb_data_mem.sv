// tb_data_mem: checks the data management memory. Writes the five
// coefficients by name and checks that the rotating ring presents them in
// the order a1, a2, b0, b1, b2 and is back at a1 after five rotations;
// checks the delay line (write w(n), shift: w(n) -> w(n-1) -> w(n-2), the
// old w(n-2) discarded) over several samples against a software copy;
// checks the partial-sum register's load and hold.
module tb_data_mem;
  import dsp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        coef_we = 0, rot = 0, w0_we = 0, shift = 0, acc_we = 0;
  coef_e       coef_sel = C_B0;
  wsel_e       wsel = W_N0;
  logic [15:0] coef_data = '0, coef, w0_d = '0, w;
  logic [31:0] acc_d = '0, acc_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [15:0] cv [5];
  logic [15:0] ref_w [3];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Write coefficients by name, in an order different from the ring's.
    cv[0] = 16'h1111; cv[1] = 16'h2222; cv[2] = 16'h3333; cv[3] = 16'h4444; cv[4] = 16'h5555;
    for (int i = 4; i >= 0; i--) begin
      @(negedge clk); coef_we = 1; coef_sel = coef_e'(i); coef_data = cv[i];
    end
    @(negedge clk); coef_we = 0;
    // Ring order of use: a1, a2, b0, b1, b2, then a1 again.
    for (int r = 0; r < 2; r++) begin
      expect16(coef, cv[C_A1], "ring a1"); @(negedge clk); rot = 1; @(negedge clk); rot = 0;
      expect16(coef, cv[C_A2], "ring a2"); @(negedge clk); rot = 1; @(negedge clk); rot = 0;
      expect16(coef, cv[C_B0], "ring b0"); @(negedge clk); rot = 1; @(negedge clk); rot = 0;
      expect16(coef, cv[C_B1], "ring b1"); @(negedge clk); rot = 1; @(negedge clk); rot = 0;
      expect16(coef, cv[C_B2], "ring b2"); @(negedge clk); rot = 1; @(negedge clk); rot = 0;
    end
    // Delay line over several samples.
    for (int i = 0; i < 3; i++) ref_w[i] = '0;
    for (int n = 0; n < 8; n++) begin
      logic [15:0] v;
      v = 16'($urandom);
      @(negedge clk); w0_we = 1; w0_d = v; @(negedge clk); w0_we = 0;
      ref_w[0] = v;
      for (int s = 0; s < 3; s++) begin
        wsel = wsel_e'(s); #1;
        expect16(w, ref_w[s], $sformatf("w(n-%0d) before shift", s));
      end
      @(negedge clk); shift = 1; @(negedge clk); shift = 0;
      ref_w[2] = ref_w[1]; ref_w[1] = ref_w[0];
      for (int s = 1; s < 3; s++) begin
        wsel = wsel_e'(s); #1;
        expect16(w, ref_w[s], $sformatf("w(n-%0d) after shift", s));
      end
    end
    // Partial sum register.
    @(negedge clk); acc_we = 1; acc_d = 32'hDEAD_BEEF; @(negedge clk); acc_we = 0; acc_d = 32'h0;
    @(negedge clk);
    checks++;
    if (acc_q !== 32'hDEAD_BEEF) begin failures++; $display("FAIL acc hold %h", acc_q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
