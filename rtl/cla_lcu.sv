// cla_lcu: lookahead carry unit over four carry lookahead groups.
//
// From the group propagate p[k] and generate g[k] of four 4-bit groups and
// the carry in, it forms the carry into groups 1..3 in parallel, two gate
// levels deep, with the same equations a cla4 uses for single bits:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0
//   c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
// and the propagate / generate of the four groups together (sp, sg), so
// that units can be chained or stacked in a further level.
//
// Interface: p, g (4 bits), cin -> c (carries into groups 1..3, c[0] is
// cin), sp, sg. Combinational.
module cla_lcu (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       cin,
  output logic [3:0] c,
  output logic       sp,
  output logic       sg
);

  always_comb begin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    sp   = &p;
    sg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule
