// cla4: 4-bit carry lookahead adder group.
//
// Per bit, an XOR2 forms the propagate p = a^b and an AND2 the generate
// g = a&b; the sum bit is p ^ carry (XOR2). The three internal carries are
// formed in parallel, two levels of AND/OR from p, g and cin:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0
//   c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
// The group outputs P0-3 = p3 p2 p1 p0 and G0-3 = g3 | p3 g2 | p3 p2 g1 |
// p3 p2 p1 g0 let a second level (cla_adder) form the carry out of the group
// without waiting for it: cout = G0-3 | P0-3 cin.
//
// Interface: a, b, cin -> s, grp_p (P0-3), grp_g (G0-3). Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       grp_p,
  output logic       grp_g
);

  logic [3:0] p, g, c;

  always_comb begin
    p = a ^ b;
    g = a & b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    s     = p ^ c;
    grp_p = &p;
    grp_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule
