// fp_div: combinational float32 divider, y = a / b.
//
// Serves the DIV operation and, with a tied to 1.0, the reciprocal RCP. The
// significand quotient is formed by an unrolled restoring division that
// produces 27 quotient bits; a non-zero final remainder becomes the sticky
// bit, so rounding to nearest-even is exact. x/0 gives a signed infinity,
// 0/0, inf/inf and NaN inputs the quiet NaN. Subnormal inputs count as zero
// and subnormal results are flushed to zero (a choice of this design).
// Purely combinational, no clock.
module fp_div
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [24:0] r;
  logic [23:0] mb;
  logic [26:0] q;
  logic [26:0] n;
  logic signed [11:0] e;

  always_comb begin
    s  = a[31] ^ b[31];
    mb = fp_sig(b);
    r  = {1'b0, fp_sig(a)};
    q  = '0;
    for (int i = 26; i >= 0; i--) begin
      if (r >= {1'b0, mb}) begin
        q[i] = 1'b1;
        r    = r - {1'b0, mb};
      end
      r = r << 1;
    end
    e = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    if (q[26]) begin
      n = {q[26:1], q[0] | (r != '0)};
    end else begin
      n = {q[25:0], r != '0};
      e = e - 12'sd1;
    end

    if (fp_is_nan(a) || fp_is_nan(b)) y = FP_QNAN;
    else if (fp_is_inf(a) && fp_is_inf(b)) y = FP_QNAN;
    else if (fp_is_zero(a) && fp_is_zero(b)) y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_zero(b)) y = {s, 8'hFF, 23'd0};
    else if (fp_is_zero(a) || fp_is_inf(b)) y = {s, 31'd0};
    else y = fp_round_pack(s, e, n);
  end

endmodule
