// tb_iir_filter: checks the second-order IIR filter at its default sizes
// (16-bit samples and coefficients, 32-bit sums, 14 coefficient fraction
// bits) against the bit-exact model in biquad_ref_pkg.
//
// Directed cases first, whose results need no model: b0 = 1 (y = x),
// b1 = 1 (y = x delayed one sample), b2 = 1 (two samples). Then random
// coefficient sets, including extreme ones that drive the saturation,
// each run on random samples. Every output is compared with the model, the
// saturation flag too, and the latency from the accepting edge to y_valid
// must be 5(N+2) = 90 cycles.
module tb_iir_filter;
  import dsp_pkg::*;
  import biquad_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        x_valid = 0, coef_we = 0;
  logic [15:0] x = '0, coef_data = '0, y;
  coef_e       coef_sel = C_B0;
  logic        busy, y_valid, sat;
  int checks = 0, failures = 0, n_sat = 0, n_ovf = 0;
  biquad_t f;

  always #5 clk = ~clk;

  iir_filter dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int b0, input int b1, input int b2, input int a1, input int a2);
    int v [5];
    v = '{b0, b1, b2, a1, a2};
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); coef_we = 1; coef_sel = coef_e'(i); coef_data = 16'(v[i]);
    end
    @(negedge clk); coef_we = 0;
    f.b0 = longint'(b0); f.b1 = longint'(b1); f.b2 = longint'(b2);
    f.a1 = longint'(a1); f.a2 = longint'(a2);
  endtask

  // Feed one sample, wait for the output, return it with its latency.
  task automatic sample(input logic [15:0] xv, output logic [15:0] yv,
                        output logic sv, output int lat);
    @(negedge clk); x_valid = 1; x = xv;
    @(posedge clk); #1 x_valid = 0; x = 16'($urandom);
    lat = 0;
    while (!y_valid && lat < 500) begin @(posedge clk); #1 lat++; end
    yv = y; sv = sat;
  endtask

  task automatic run_and_check(input logic [15:0] xv);
    logic [15:0] yv; logic sv; int lat;
    longint ye; bit se, oe;
    sample(xv, yv, sv, lat);
    run(f, longint'($signed(xv)), ye, se, oe);
    checks++;
    if (yv !== ye[15:0] || sv !== se || lat != 90) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d: y=%0d sat=%0d lat=%0d, expected y=%0d sat=%0d", $signed(xv),
                 $signed(yv), sv, lat, ye, se);
    end
    if (se) n_sat++;
    if (oe) n_ovf++;
  endtask

  task automatic reset_filter();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    f.w1 = 0; f.w2 = 0;
  endtask

  initial begin
    logic [15:0] xs [8];
    logic [15:0] yv; logic sv; int lat;
    f = '{default: 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: identity, one-sample and two-sample delay.
    for (int d = 0; d < 3; d++) begin
      reset_filter();
      load(d == 0 ? 16384 : 0, d == 1 ? 16384 : 0, d == 2 ? 16384 : 0, 0, 0);
      for (int n = 0; n < 8; n++) begin
        xs[n] = 16'($urandom);
        sample(xs[n], yv, sv, lat);
        checks++;
        if (yv !== (n >= d ? xs[n-d] : 16'h0)) begin
          failures++;
          $display("FAIL delay %0d sample %0d: y=%h", d, n, yv);
        end
      end
    end
    // Random coefficient sets, moderate and extreme.
    for (int set = 0; set < 12; set++) begin
      int sc;
      reset_filter();
      sc = (set % 3 == 2) ? 65536 : 8192;
      load(int'($urandom % sc) - sc / 2, int'($urandom % sc) - sc / 2, int'($urandom % sc) - sc / 2,
           int'($urandom % sc) - sc / 2, int'($urandom % sc) - sc / 2);
      for (int n = 0; n < 60; n++) run_and_check(16'($urandom));
    end
    // Extreme feedback that overflows the 32-bit partial sum.
    reset_filter();
    load(16384, 0, 0, -32768, -32768);
    for (int n = 0; n < 10; n++) run_and_check(16'h7FFF);
    // Floating-point difference equation against the fixed-point filter.
    begin
      real cb0, cb1, cb2, ca1, ca2, xr0, xr1, xr2, yr1, yr2, yr0;
      reset_filter();
      load(1024, 2048, 1024, -19661, 7373);
      cb0 = 1024 / 16384.0; cb1 = 2048 / 16384.0; cb2 = 1024 / 16384.0;
      ca1 = -19661 / 16384.0; ca2 = 7373 / 16384.0;
      xr1 = 0; xr2 = 0; yr1 = 0; yr2 = 0;
      for (int n = 0; n < 100; n++) begin
        logic [15:0] xv;
        xv = 16'($rtoi(4000.0 * $sin(2.0 * 3.14159265 * n / 25.0)));
        sample(xv, yv, sv, lat);
        xr0 = $itor($signed(xv)) / 32768.0;
        yr0 = cb0 * xr0 + cb1 * xr1 + cb2 * xr2 - ca1 * yr1 - ca2 * yr2;
        checks++;
        if ($signed(yv) - yr0 * 32768.0 > 16.0 || yr0 * 32768.0 - $signed(yv) > 16.0) begin
          failures++;
          $display("FAIL difference equation n=%0d: y=%0d expected %f", n, $signed(yv), yr0 * 32768.0);
        end
        xr2 = xr1; xr1 = xr0; yr2 = yr1; yr1 = yr0;
      end
    end
    checks++;
    if (n_sat == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL saturation (%0d) or adder overflow (%0d) never happened", n_sat, n_ovf);
    end
    $display("saturated samples %0d, samples with adder overflow %0d", n_sat, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
