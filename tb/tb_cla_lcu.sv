// tb_cla_lcu: exhaustive check of the lookahead carry unit. Each of the
// four groups is modelled only by its propagate/generate pair; for all 512
// combinations of p, g and cin the carry into every group is computed by
// rippling c(k+1) = g(k) | p(k) c(k), and the unit's parallel carries and
// its block propagate / generate must agree with it.
module tb_cla_lcu;
  logic [3:0] p, g, c;
  logic       cin, sp, sg;
  int checks = 0, failures = 0;

  cla_lcu dut (.p(p), .g(g), .cin(cin), .c(c), .sp(sp), .sg(sg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] rc;
      logic       g_only;
      {cin, p, g} = 9'(v);
      #1;
      rc[0] = cin;
      for (int k = 0; k < 4; k++) rc[k+1] = g[k] | (p[k] & rc[k]);
      // Block generate: carry out with no carry in.
      g_only = 1'b0;
      for (int k = 0; k < 4; k++) g_only = g[k] | (p[k] & g_only);
      checks++;
      if (c !== rc[3:0] || sp !== (&p) || sg !== g_only) begin
        failures++;
        $display("FAIL p=%b g=%b cin=%0d: c=%b sp=%0d sg=%0d", p, g, cin, c, sp, sg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
