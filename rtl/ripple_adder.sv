// ripple_adder: W-bit ripple carry adder, one gate-level full adder per bit.
//
// Each bit uses the gates of the 4-bit ripple carry adder diagram: an XOR2
// forms the half sum a^b, a second XOR2 adds the incoming carry, one AND2
// forms a&b, another AND2 forms (a^b)&c, and an OR2 merges them into the
// carry to the next bit. The carry passes through every bit, so the delay
// grows linearly with W (2W+2 gate delays in the source's count).
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Combinational.
// W defaults to 4, the width of the diagram.
module ripple_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0]   c;
  logic [W-1:0] hs, g, pc;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign hs[i]  = a[i] ^ b[i];       // XOR2
    assign s[i]   = hs[i] ^ c[i];      // XOR2
    assign g[i]   = a[i] & b[i];       // AND2
    assign pc[i]  = hs[i] & c[i];      // AND2
    assign c[i+1] = g[i] | pc[i];      // OR2
  end

  assign cout = c[W];

endmodule
