// fp_modrem: combinational float32 remainder and modulus.
//
// Serves the REM and MOD operations.
//   remainder: r = a - b * trunc(a / b), sign of a (as C fmod)
//   modulus:   m = a - b * floor(a / b), sign of b
// The remainder is exact. It is found by long division of the significands
// over the exponent difference: one compare-and-subtract per quotient bit,
// unrolled for the largest possible difference (MAX_SHIFT steps), only the
// steps up to the actual difference being active. The final partial
// remainder is renormalised, which needs no rounding. The modulus equals the
// remainder when that is zero or has the sign of b; otherwise it is
// remainder + b, done by an fp_addsub (rounded, as floored modulus is in
// software libraries). The two definitions are this design's choice; the
// original only names modulus and remainder as separate operations.
// b = 0, a = inf or NaN inputs give the quiet NaN; b = inf leaves a (or, for
// the modulus with opposite signs, b). Subnormals are flushed to zero.
// Purely combinational, no clock.
module fp_modrem
  import fpu_pkg::*;
#(
  parameter int unsigned MAX_SHIFT = 254  // largest exponent difference of normal floats
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        is_mod,  // 1: modulus, 0: remainder
  output logic [31:0] y
);

  logic [23:0] mb;
  logic [24:0] r;
  logic [8:0]  diff;
  logic [4:0]  lz;
  logic [26:0] n;
  logic signed [11:0] e;
  logic [31:0] rem;     // remainder, for finite a and finite non-zero b
  logic        rem_special;
  logic [31:0] rem_special_y;
  logic [31:0] fixup;   // rem + b

  always_comb begin
    mb   = fp_sig(b);
    r    = {1'b0, fp_sig(a)};
    diff = 9'(a[30:23]) - 9'(b[30:23]);
    for (int k = 0; k <= int'(MAX_SHIFT); k++) begin
      if (9'(k) <= diff) begin
        if (r >= {1'b0, mb}) r = r - {1'b0, mb};
        if (9'(k) < diff) r = r << 1;
      end
    end
    lz = clz27({r[23:0], 3'b000});
    n  = {r[23:0], 3'b000} << lz;
    e  = 12'(b[30:23]) - 12'(lz);

    if (fp_is_zero(a)) rem = {a[31], 31'd0};
    else if (a[30:23] < b[30:23]) rem = a;  // |a| < |b|
    else if (r == '0) rem = {a[31], 31'd0};
    else rem = fp_round_pack(a[31], e, n);  // exact: n has no bits below the kept 24

    rem_special   = 1'b1;
    rem_special_y = FP_QNAN;
    if (fp_is_nan(a) || fp_is_nan(b) || fp_is_inf(a) || fp_is_zero(b)) rem_special_y = FP_QNAN;
    else if (fp_is_inf(b)) begin
      if (fp_is_zero(a)) rem_special_y = is_mod ? {b[31], 31'd0} : {a[31], 31'd0};
      else if (is_mod && (a[31] != b[31])) rem_special_y = b;
      else rem_special_y = a;
    end else rem_special = 1'b0;
  end

  fp_addsub u_fixup (
    .a  (rem),
    .b  (b),
    .sub(1'b0),
    .y  (fixup)
  );

  always_comb begin
    if (rem_special) y = rem_special_y;
    else if (!is_mod) y = rem;
    else if (fp_is_zero(rem)) y = {b[31], 31'd0};
    else if (rem[31] == b[31]) y = rem;
    else y = fixup;
  end

endmodule
