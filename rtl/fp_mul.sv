// fp_mul: combinational float32 multiplier, y = a * b.
//
// Serves the MUL operation and the product of MAC. The 24-bit significands
// are multiplied into a 48-bit product, which is normalised by at most one
// place; the bits below the kept 24 fold into guard, round and sticky and the
// result is rounded to nearest-even. inf * 0 and NaN inputs give the quiet
// NaN. Subnormal inputs count as zero and subnormal results are flushed to
// zero (a choice of this design). Purely combinational, no clock.
module fp_mul
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [47:0] p;
  logic [26:0] n;
  logic signed [11:0] e;

  always_comb begin
    s = a[31] ^ b[31];
    p = fp_sig(a) * fp_sig(b);
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47]) begin
      n = {p[47:22], |p[21:0]};
      e = e + 12'sd1;
    end else begin
      n = {p[46:21], |p[20:0]};
    end

    if (fp_is_nan(a) || fp_is_nan(b)) y = FP_QNAN;
    else if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_inf(b)) y = {s, 8'hFF, 23'd0};
    else if (fp_is_zero(a) || fp_is_zero(b)) y = {s, 31'd0};
    else y = fp_round_pack(s, e, n);
  end

endmodule
