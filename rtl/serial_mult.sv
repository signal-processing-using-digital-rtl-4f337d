// serial_mult: signed two's-complement serial (shift-and-add) multiplier.
//
// Data path, after the serial multiplier diagram: the multiplicand A is sign
// extended to 2N bits and loaded into a shift register that moves one place
// left per cycle; the multiplier B is loaded into a shift register that
// moves one place right per cycle. An AND of the shifted A with the current
// low bit of B forms the partial product, which an adder/subtractor (addsub,
// 2N bits) adds to the product register. The last bit of B is its sign bit
// and carries weight -2^(N-1), so on that cycle the partial product is
// subtracted instead of added: P = sum_{i<N-1} b_i A 2^i - b_{N-1} A 2^{N-1}.
//
// Timing: start is sampled on a clock edge (A and B are captured then) and
// the product is built in the next N cycles, one bit of B per cycle. done is
// a one-cycle pulse in the cycle after the last of them; p then holds the
// product and keeps it until the next start. busy is high while the N add
// cycles run; a start while busy is ignored. Active-low synchronous reset.
//
// N defaults to 16; 2N must be a multiple of 4 (the adder's group size).
module serial_mult #(
  parameter int unsigned N = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic             busy,
  output logic             done,
  output logic [2*N-1:0]   p
);

  localparam int unsigned CW = $clog2(N);

  logic [2*N-1:0] a_sh;      // sign-extended multiplicand, shifted left
  logic [N-1:0]   b_sh;      // multiplier, shifted right
  logic [CW-1:0]  cnt;       // bit of B being used
  logic [2*N-1:0] partial;   // AND of a_sh with the current B bit
  logic [2*N-1:0] sum;
  logic           last;
  logic           unused_cout, unused_ovf;

  assign partial = a_sh & {2*N{b_sh[0]}};
  assign last    = (cnt == CW'(N-1));

  addsub #(.W(2*N)) u_addsub (
    .a   (p),
    .b   (partial),
    .sub (last),
    .s   (sum),
    .cout(unused_cout),
    .ovf (unused_ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      a_sh <= '0;
      b_sh <= '0;
      p    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_sh <= {{N{a[N-1]}}, a};
          b_sh <= b;
          p    <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        p    <= sum;
        a_sh <= a_sh << 1;
        b_sh <= b_sh >> 1;
        cnt  <= cnt + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
