// fp_addsub: combinational float32 adder/subtractor, y = a + b or a - b.
//
// Serves the ADD and SUB operations of the coprocessor and the addition step
// of MAC and of floored MOD. The operand of larger magnitude is kept, the
// other is shifted right onto a 27-bit significand (24 bits plus guard, round
// and a sticky bit that collects everything shifted further), the two are
// added or subtracted, the sum is renormalised and rounded to nearest-even.
// Special values: NaN in, or inf - inf, gives the quiet NaN; an exact zero
// sum is +0 unless both addends are -0. Subnormal inputs count as zero and
// subnormal results are flushed to zero (a choice of this design; the number
// format is float32 as in the original coprocessor).
// Purely combinational, no clock.
module fp_addsub
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,  // 1: a - b
  output logic [31:0] y
);

  logic [31:0] bb;
  logic        swap;
  logic [31:0] hi, lo;
  logic [7:0]  d;
  logic [26:0] mb, ms, ms_sh;
  logic        sticky;
  logic        eff_sub;
  logic [27:0] sum;
  logic [26:0] n;
  logic [4:0]  lz;
  logic signed [11:0] e;

  always_comb begin
    bb      = {b[31] ^ sub, b[30:0]};
    swap    = bb[30:0] > a[30:0];
    hi     = swap ? bb : a;
    lo   = swap ? a : bb;
    eff_sub = a[31] ^ bb[31];
    d       = hi[30:23] - lo[30:23];
    mb      = {fp_sig(hi), 3'b000};
    ms      = {fp_sig(lo), 3'b000};
    if (d >= 8'd27) begin
      ms_sh  = 27'd1;  // all bits become sticky
      sticky = 1'b1;
    end else begin
      ms_sh  = ms >> d;
      sticky = |(ms & ((27'd1 << d) - 27'd1));
      ms_sh[0] = ms_sh[0] | sticky;
    end
    sum = eff_sub ? {1'b0, mb} - {1'b0, ms_sh} : {1'b0, mb} + {1'b0, ms_sh};
    e   = 12'(hi[30:23]);
    lz  = '0;
    if (sum[27]) begin
      n = {sum[27:2], sum[1] | sum[0]};
      e = e + 12'sd1;
    end else begin
      lz = clz27(sum[26:0]);
      n  = sum[26:0] << lz;
      e  = e - 12'(lz);
    end

    if (fp_is_nan(a) || fp_is_nan(bb)) y = FP_QNAN;
    else if (fp_is_inf(a) && fp_is_inf(bb)) y = eff_sub ? FP_QNAN : a;
    else if (fp_is_inf(a)) y = a;
    else if (fp_is_inf(bb)) y = bb;
    else if (fp_is_zero(a) && fp_is_zero(bb)) y = {a[31] & bb[31], 31'd0};
    else if (fp_is_zero(a)) y = bb;
    else if (fp_is_zero(bb)) y = a;
    else if (sum == '0) y = 32'd0;
    else y = fp_round_pack(hi[31], e, n);
  end

endmodule
