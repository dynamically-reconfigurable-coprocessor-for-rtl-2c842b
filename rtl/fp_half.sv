// fp_half: combinational float32 division by two, y = a / 2.
//
// The DIVBY2 operation: the biased exponent is decremented, which is exact.
// A normal input with the smallest exponent would become subnormal and is
// flushed to a signed zero (this design keeps no subnormals). Zeros and
// infinities pass unchanged, NaN becomes the quiet NaN. Purely
// combinational, no clock.
module fp_half
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] y
);

  always_comb begin
    if (fp_is_nan(a)) y = FP_QNAN;
    else if (fp_is_inf(a)) y = a;
    else if (a[30:23] <= 8'd1) y = {a[31], 31'd0};
    else y = {a[31], a[30:23] - 8'd1, a[22:0]};
  end

endmodule
