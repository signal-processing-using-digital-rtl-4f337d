// biquad_ref_pkg: bit-exact software model of the second-order Direct Form
// II filter, for the testbenches. It works in 64-bit integers, so overflow
// of the 32-bit partial sum is seen by comparing with the 32-bit range
// rather than by looking at carries:
//
//   sum = acc +/- w * c              (exact)
//   out of the 32-bit range -> partial sum = extreme of the sum's sign,
//                              result     = 16-bit extreme of that sign
//   otherwise               -> partial sum = sum,
//                              result = floor(sum / 2^14) clamped to 16 bits
//
// One sample: acc = x * 2^14; acc -= a1 w1; acc -= a2 w2; w0 = result;
// acc = b0 w0; acc += b1 w1; acc += b2 w2; y = result; w2 = w1; w1 = w0.
package biquad_ref_pkg;

  localparam longint ACC_MAX = 64'sd2147483647;
  localparam longint ACC_MIN = -64'sd2147483648;

  typedef struct {
    longint w1, w2;      // delay line
    longint b0, b1, b2, a1, a2;
  } biquad_t;

  // One multiply-accumulate step followed by truncation.
  function automatic void mac(input longint acc, input longint w, input longint c,
                              input bit sub, output longint acc_out,
                              output longint res, output bit sat, output bit ovf);
    longint full, q;
    full = sub ? acc - w * c : acc + w * c;
    ovf  = (full > ACC_MAX) || (full < ACC_MIN);
    if (ovf) begin
      acc_out = (full > 0) ? ACC_MAX : ACC_MIN;
      res     = (full > 0) ? 32767 : -32768;
      sat     = 1'b1;
    end else begin
      acc_out = full;
      q = full >>> 14;
      sat = 1'b0;
      res = q;
      if (q > 32767)  begin res = 32767;  sat = 1'b1; end
      if (q < -32768) begin res = -32768; sat = 1'b1; end
    end
  endfunction

  // Process one sample; returns y, and whether the sample saturated
  // (adder overflow in any step, or clamping of w(n) or y(n)), and whether
  // an adder overflow happened.
  function automatic void run(inout biquad_t f, input longint x,
                              output longint y, output bit sat, output bit any_ovf);
    longint acc, w0, r;
    bit s, o;
    sat = 0; any_ovf = 0;
    acc = x * 16384;
    mac(acc, f.w1, f.a1, 1, acc, r, s, o); sat |= o; any_ovf |= o;
    mac(acc, f.w2, f.a2, 1, acc, r, s, o); sat |= s; any_ovf |= o; w0 = r;
    mac(0,   w0,   f.b0, 0, acc, r, s, o); sat |= o; any_ovf |= o;
    mac(acc, f.w1, f.b1, 0, acc, r, s, o); sat |= o; any_ovf |= o;
    mac(acc, f.w2, f.b2, 0, acc, r, s, o); sat |= s; any_ovf |= o; y = r;
    f.w2 = f.w1;
    f.w1 = w0;
  endfunction

endpackage
