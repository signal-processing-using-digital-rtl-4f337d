// par_mult: signed N x N parallel (combinational) multiplier.
//
// The whole 2N-bit two's-complement product is formed in one combinational
// step, leaving the choice of array structure to synthesis, as the source's
// compiler-generated parallel multiplier did. It trades area for speed
// against serial_mult, which needs N clock cycles but only one adder.
//
// Interface: a, b (N bits, signed) -> p (2N bits, signed). Combinational.
module par_mult #(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  assign p = (2*N)'(a) * (2*N)'(b);

endmodule
