// cla_adder: W-bit two-level carry lookahead adder.
//
// The operands are cut into 4-bit groups, each a cla4 that reports its
// group propagate P and generate G. Every four groups share a lookahead
// carry unit (cla_lcu) that forms the carries into those groups in parallel
// from P, G and the carry into the block of 16 bits. For W = 16 that is the
// whole adder: a carry never ripples, and the path from an operand bit to a
// sum bit is about ten gate levels (propagate/generate, group P/G, unit
// carry, group carry, sum XOR), against 2W+2 for a ripple adder. Wider
// adders chain their 16-bit blocks through the units' block P/G
// (c_next = G | P c), one two-level step per 16 bits; adding a third
// lookahead level over the blocks is left out, a choice of this design.
// A width that is not a multiple of 16 fills the unused group inputs of
// the last unit with empty groups (propagate 1, generate 0), so its block
// P/G are those of the groups that exist. The carries the unit forms for
// empty groups are not used.
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Combinational.
// W must be a multiple of 4; it defaults to 16, the lookahead adder width
// the source compares with a 16-bit ripple adder.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = W / 4;          // 4-bit groups
  localparam int unsigned NB = (NG + 3) / 4;   // 16-bit blocks (one unit each)

  logic [4*NB-1:0] gp, gg;    // group propagate / generate, zero-padded
  logic [4*NB-1:0] gc;        // carry into each group (empty ones unused)
  logic [NB:0]     bc;        // carry into each 16-bit block
  logic [NB-1:0]   bp, bg;    // block propagate / generate

  assign bc[0] = cin;

  for (genvar k = 0; k < 4 * NB; k++) begin : g_grp
    if (k < NG) begin : g_used
      cla4 u_grp (
        .a    (a[4*k +: 4]),
        .b    (b[4*k +: 4]),
        .cin  (gc[k]),
        .s    (s[4*k +: 4]),
        .grp_p(gp[k]),
        .grp_g(gg[k])
      );
    end else begin : g_pad
      // An empty group passes its carry on unchanged.
      assign gp[k] = 1'b1;
      assign gg[k] = 1'b0;
    end
  end

  for (genvar u = 0; u < NB; u++) begin : g_blk
    cla_lcu u_lcu (
      .p  (gp[4*u +: 4]),
      .g  (gg[4*u +: 4]),
      .cin(bc[u]),
      .c  (gc[4*u +: 4]),
      .sp (bp[u]),
      .sg (bg[u])
    );
    assign bc[u+1] = bg[u] | (bp[u] & bc[u]);
  end

  assign cout = bc[NB];

  initial begin
    assert (W % 4 == 0 && W >= 4)
      else $error("cla_adder: W=%0d must be a positive multiple of 4", W);
  end

endmodule
