// mirror_adder4: four-bit adder made of four cascaded one-bit full adder
// cells (full_adder_cell).
//
// The cell returns inverted sum and carry. A full adder is self-dual:
// feeding it inverted inputs yields the true sum and carry. The cascade uses
// that to avoid an inverter in the carry path: bits 0 and 2 get true
// operands and produce inverted outputs, bits 1 and 3 get inverted operands
// (and the inverted carry from the bit below) and produce true outputs.
// Only the even sum bits need an output inverter. The alternating-polarity
// arrangement is this design's choice; the cascade of four cells is the
// source design's plan.
//
// Interface: a, b (4 bits), cin -> s (4 bits), cout. Combinational.
module mirror_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  // c[i] is the carry into bit i, in the polarity that bit expects:
  // true for even bits, inverted for odd bits.
  logic [4:0] c;
  logic [3:0] ca, cb, cs;     // operands and sum in the cell's polarity

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    if (i % 2 == 0) begin : g_even
      assign ca[i] = a[i];
      assign cb[i] = b[i];
      assign s[i]  = ~cs[i];
    end else begin : g_odd
      assign ca[i] = ~a[i];
      assign cb[i] = ~b[i];
      assign s[i]  = cs[i];
    end
    full_adder_cell u_fa (
      .a     (ca[i]),
      .b     (cb[i]),
      .cin   (c[i]),
      .cout_n(c[i+1]),
      .s_n   (cs[i])
    );
  end

  // Bit 3 is odd, so its carry output is already true.
  assign cout = c[4];

endmodule
