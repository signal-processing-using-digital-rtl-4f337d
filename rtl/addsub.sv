// addsub: W-bit two's-complement adder/subtractor.
//
// sub = 0 gives a + b, sub = 1 gives a - b, formed as a + ~b + 1: the second
// operand is passed through XOR gates controlled by sub and sub is the carry
// in. The addition itself is a cla_adder (4-bit lookahead groups).
//
// cout is the carry out of the most significant bit. ovf flags a signed
// overflow: the carry into the sign bit differs from the carry out of it,
// i.e. the sign bit of s no longer is the sign of the true result. The
// truncation circuit uses ovf to saturate.
//
// Interface: a, b (W bits), sub -> s (W bits), cout, ovf. Combinational.
// W defaults to 32, the width of the filter's adder/subtractor.
module addsub #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         ovf
);

  logic [W-1:0] bx;

  assign bx = b ^ {W{sub}};

  cla_adder #(.W(W)) u_add (
    .a   (a),
    .b   (bx),
    .cin (sub),
    .s   (s),
    .cout(cout)
  );

  // Operands of equal sign giving a sum of the other sign: signed overflow.
  assign ovf = (a[W-1] == bx[W-1]) && (s[W-1] != a[W-1]);

endmodule
