// truncation: truncation and saturation of an adder result.
//
// The adder/subtractor produces an ACC_W-bit sum scaled by 2^(N-1+FRAC)
// (a Q1.(N-1) sample times a coefficient with FRAC fraction bits). This
// block turns it into the two values the data management stores:
//
//  * acc_sat, the ACC_W-bit value kept as a partial sum. If the adder
//    reported a signed overflow (ovf), the sign bit of the sum is really a
//    carry out of the magnitude: the sum is discarded and the largest value
//    of the true sign is returned instead (the largest positive value when
//    the sum looks negative but is a large positive number, and the most
//    negative value in the mirror case).
//  * y, the N-bit sample: the sum shifted right by FRAC (the low bits are
//    dropped, i.e. truncation toward minus infinity), clamped to the N-bit
//    range. Overflow of the adder gives the N-bit extreme of the true sign.
//
// sat is high when either clamp acted on y or the adder overflowed.
// Rounding toward minus infinity and clamping to the N-bit range are this
// design's choices; saturating on adder overflow follows the source.
//
// Interface: acc, ovf -> acc_sat, y, sat. Combinational.
module truncation #(
  parameter int unsigned N     = dsp_pkg::N_DEF,
  parameter int unsigned ACC_W = dsp_pkg::ACC_DEF,
  parameter int unsigned FRAC  = dsp_pkg::FRAC_DEF
) (
  input  logic [ACC_W-1:0] acc,
  input  logic             ovf,
  output logic [ACC_W-1:0] acc_sat,
  output logic [N-1:0]     y,
  output logic             sat
);

  localparam logic [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};
  localparam logic [N-1:0]     Y_MAX   = {1'b0, {(N-1){1'b1}}};
  localparam logic [N-1:0]     Y_MIN   = {1'b1, {(N-1){1'b0}}};

  logic signed [ACC_W-1:0] shifted;
  logic                    in_range;
  logic                    true_neg;

  always_comb begin
    shifted  = $signed(acc) >>> FRAC;
    // In range when the bits above the N-bit result all equal its sign.
    in_range = (shifted[ACC_W-1:N-1] == {(ACC_W-N+1){shifted[N-1]}});
    true_neg = ~acc[ACC_W-1];
    if (ovf) begin
      acc_sat = true_neg ? ACC_MIN : ACC_MAX;
      y       = true_neg ? Y_MIN : Y_MAX;
      sat     = 1'b1;
    end else begin
      acc_sat = acc;
      sat     = ~in_range;
      if (in_range) y = shifted[N-1:0];
      else          y = shifted[ACC_W-1] ? Y_MIN : Y_MAX;
    end
  end

endmodule
