// full_adder_cell: one-bit full adder cell at gate level, in the form of a
// CMOS "mirror" adder.
//
// Gates, as laid out in the one-bit adder logic diagram: three AND2 gates
// form A&B, A&CIN and B&CIN and a NOR3 combines them into the inverted carry.
// An OR3 of the three inputs is ANDed (AND2) with the inverted carry, an AND3
// forms A&B&CIN, and a NOR2 of those two gives the inverted sum.
//
// Both outputs are therefore active low: cout_n = ~carry, s_n = ~sum. The
// diagram labels these nodes COUT and S; the names here carry the _n suffix
// because the gates as drawn produce the complement. Cascades of this cell
// (mirror_adder4, array_mult) restore polarity.
//
// Purely combinational; no clock.
module full_adder_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic cout_n,
  output logic s_n
);

  logic ab, acin, bcin;     // AND2 gates of the carry network
  logic any1, one_only;     // OR3 and the AND2 that follows it
  logic all3;               // AND3

  always_comb begin
    ab       = a & b;
    acin     = a & cin;
    bcin     = b & cin;
    cout_n   = ~(ab | acin | bcin);        // NOR3
    any1     = a | b | cin;                // OR3
    one_only = cout_n & any1;              // AND2
    all3     = a & b & cin;                // AND3
    s_n      = ~(one_only | all3);         // NOR2
  end

endmodule
