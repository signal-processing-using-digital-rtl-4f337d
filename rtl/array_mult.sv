// array_mult: N x N unsigned cellular array multiplier.
//
// Each cell of the array ANDs one bit of the multiplicand a with one bit of
// the multiplier b and adds that partial-product bit, with a full adder
// cell, to the running sum coming from the row above. Row 0 is the partial
// product a & b0; its bit 0 is p0. Row i (1..N-1) adds a & b_i to the
// previous row's sum shifted down one place (the previous row's carry out
// enters as its top bit); the carry runs through the row from cell to
// cell, and the lowest sum bit of row i leaves as p_i. The last row gives
// p_(N-1)..p_(2N-2) and its carry out is p_(2N-1). So a bit of weight k only
// ever meets bits of weight k: bits are summed according to their
// significance, the more significant ones shifted into place.
//
// The full adders are full_adder_cell instances (inverted outputs), with
// inverters to restore polarity. Carrying the carry along each row is a
// choice of this design (a textbook array multiplier); N defaults to 4, the
// size drawn for the cellular multiplier.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). Combinational.
module array_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // row_s[i][j]: sum bit j of row i; row_c[i][j]: carry out of cell (i,j).
  logic [N-1:0] row_s [N];
  logic [N-1:0] row_c [N];
  logic [N-1:0] row_co;              // carry out of each row

  assign row_s[0]  = a & {N{b[0]}};
  assign row_c[0]  = '0;
  assign row_co[0] = 1'b0;
  assign p[0]      = row_s[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    logic [N-1:0] up;                // addend coming down from row i-1
    logic [N-1:0] pp;                // partial product a & b_i
    logic [N-1:0] s_n, c_n;

    assign pp = a & {N{b[i]}};
    assign up = {row_co[i-1], row_s[i-1][N-1:1]};

    for (genvar j = 0; j < N; j++) begin : g_cell
      logic cin;
      if (j == 0) begin : g_first
        assign cin = 1'b0;
      end else begin : g_next
        assign cin = row_c[i][j-1];
      end
      full_adder_cell u_fa (
        .a     (pp[j]),
        .b     (up[j]),
        .cin   (cin),
        .cout_n(c_n[j]),
        .s_n   (s_n[j])
      );
      assign row_s[i][j] = ~s_n[j];
      assign row_c[i][j] = ~c_n[j];
    end

    assign row_co[i] = row_c[i][N-1];
    assign p[i]      = row_s[i][0];
  end

  if (N > 1) begin : g_top
    assign p[2*N-2:N] = row_s[N-1][N-1:1];
    assign p[2*N-1]   = row_co[N-1];
  end else begin : g_one
    assign p[1] = 1'b0;
  end

endmodule
