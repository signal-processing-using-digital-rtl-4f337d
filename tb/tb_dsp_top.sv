// tb_dsp_top: end-to-end test of the whole processor at its default sizes
// (no parameter overrides).
//
// The filter is taken through the operations a user of the processor
// performs: load a set of coefficients (a low-pass section), stream samples
// from the converter side and collect the outputs, retune to a different
// application by writing new coefficients (a high-pass section), stream
// again, and finally drive it hard with coefficients and samples that
// overflow the 32-bit sums. Each output is compared with the bit-exact
// model in biquad_ref_pkg, with its saturation flag and latency (90 edges).
// A sample is also offered while the filter is busy; it must be ignored.
//
// Counted mechanisms, each of which must occur at least once: serial
// multiplications, subtracting (feedback) steps, delay-line shifts,
// coefficient ring rotations, retuning, positive and negative output
// saturation, adder overflow, and samples refused while busy.
//
// The side-by-side arithmetic blocks are checked on random operands against
// integer arithmetic.
module tb_dsp_top;
  import biquad_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        x_valid = 0, coef_we = 0;
  logic [15:0] x_in = '0, coef_data = '0, y_out;
  logic [2:0]  coef_sel = '0;
  logic        busy, y_valid, sat;
  logic [3:0]  ma_a = '0, ma_b = '0, ma_s, am_a = '0, am_b = '0, ra_a = '0, ra_b = '0, ra_s;
  logic        ma_cin = 0, ma_cout, ra_cin = 0, ra_cout, cla_cin = 0, cla_cout;
  logic [7:0]  am_p;
  logic [15:0] cla_a = '0, cla_b = '0, cla_s, pm_a = '0, pm_b = '0;
  logic [31:0] pm_p;

  int checks = 0, failures = 0;
  int n_mult = 0, n_sub = 0, n_shift = 0, n_rot = 0, n_retune = 0;
  int n_satp = 0, n_satn = 0, n_ovf = 0, n_refused = 0;
  biquad_t f;

  always #5 clk = ~clk;

  dsp_top dut (.*);

  // Mechanism counters, from the filter's internal strobes.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_filter.u_mac.done)                                n_mult++;
    if (dut.u_filter.u_mac.done && dut.u_filter.mac_sub)        n_sub++;
    if (dut.u_filter.shift)                                     n_shift++;
    if (dut.u_filter.rot)                                       n_rot++;
    if (dut.u_filter.acc_we && dut.u_filter.u_mac.ovf)          n_ovf++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load(input int b0, input int b1, input int b2, input int a1, input int a2);
    int v [5];
    v = '{b0, b1, b2, a1, a2};
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); coef_we = 1; coef_sel = 3'(i); coef_data = 16'(v[i]);
    end
    @(negedge clk); coef_we = 0;
    f.b0 = longint'(b0); f.b1 = longint'(b1); f.b2 = longint'(b2);
    f.a1 = longint'(a1); f.a2 = longint'(a2);
    n_retune++;
  endtask

  task automatic sample(input logic [15:0] xv, input bit poke_busy);
    int lat;
    longint ye; bit se, oe;
    @(negedge clk); x_valid = 1; x_in = xv;
    @(posedge clk); #1 x_valid = 0; x_in = 16'($urandom);
    lat = 0;
    while (!y_valid && lat < 500) begin
      if (poke_busy && lat == 40) begin
        // Offer another sample mid-computation; it must not be taken.
        x_valid = 1;
        @(posedge clk); #1 x_valid = 0; lat++;
        n_refused++;
      end else begin
        @(posedge clk); #1 lat++;
      end
    end
    run(f, longint'($signed(xv)), ye, se, oe);
    chk(y_out === ye[15:0] && sat === se && lat == 90,
        $sformatf("x=%0d: y=%0d sat=%0d lat=%0d, expected y=%0d sat=%0d",
                  $signed(xv), $signed(y_out), sat, lat, ye, se));
    if (se && ye > 0) n_satp++;
    if (se && ye < 0) n_satn++;
  endtask

  task automatic side_blocks();
    longint pe;
    ma_a = 4'($urandom); ma_b = 4'($urandom); ma_cin = 1'($urandom);
    am_a = 4'($urandom); am_b = 4'($urandom);
    ra_a = 4'($urandom); ra_b = 4'($urandom); ra_cin = 1'($urandom);
    cla_a = 16'($urandom); cla_b = 16'($urandom); cla_cin = 1'($urandom);
    pm_a = 16'($urandom); pm_b = 16'($urandom);
    #1;
    pe = longint'($signed(pm_a)) * longint'($signed(pm_b));
    chk({ma_cout, ma_s} == 5'(int'(ma_a) + int'(ma_b) + int'(ma_cin)), "cascaded full adders");
    chk(am_p == 8'(int'(am_a) * int'(am_b)), "array multiplier");
    chk({ra_cout, ra_s} == 5'(int'(ra_a) + int'(ra_b) + int'(ra_cin)), "ripple adder");
    chk({cla_cout, cla_s} == 17'(int'(cla_a) + int'(cla_b) + int'(cla_cin)), "lookahead adder");
    chk(pm_p == pe[31:0], "parallel multiplier");
  endtask

  initial begin
    real ph;
    f = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Low-pass section (coefficients in Q2.14): a sine plus a fast
    // alternating component.
    load(1024, 2048, 1024, -19661, 7373);
    for (int n = 0; n < 64; n++) begin
      ph = 2.0 * 3.14159265 * n / 32.0;
      sample(16'($rtoi(12000.0 * $sin(ph)) + ((n % 2 != 0) ? 6000 : -6000)), n == 5);
      side_blocks();
    end
    // Retune: high-pass section, filter state carried over.
    load(13000, -26000, 13000, -19661, 7373);
    for (int n = 0; n < 64; n++) begin
      sample(16'($urandom), n == 7);
      side_blocks();
    end
    // Drive into saturation and adder overflow.
    load(32767, 32767, 32767, -32768, -32768);
    for (int n = 0; n < 8;  n++) sample(16'h7FFF, 0);
    for (int n = 0; n < 16; n++) sample(16'h8000, 0);
    for (int n = 0; n < 16; n++) sample(16'($urandom), 0);

    chk(n_mult > 0,    "serial multiplications");
    chk(n_sub > 0,     "feedback subtractions");
    chk(n_shift > 0,   "delay-line shifts");
    chk(n_rot > 0,     "coefficient ring rotations");
    chk(n_retune > 1,  "retuning");
    chk(n_satp > 0,    "positive saturation");
    chk(n_satn > 0,    "negative saturation");
    chk(n_ovf > 0,     "adder overflow");
    chk(n_refused > 0, "sample refused while busy");
    chk(n_mult == 5 * n_shift && n_rot == n_mult, "five steps per sample");
    $display("mult=%0d sub=%0d shift=%0d rot=%0d retune=%0d sat+=%0d sat-=%0d ovf=%0d refused=%0d",
             n_mult, n_sub, n_shift, n_rot, n_retune, n_satp, n_satn, n_ovf, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
