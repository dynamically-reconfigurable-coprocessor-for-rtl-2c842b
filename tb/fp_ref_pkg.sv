// fp_ref_pkg: reference float32 arithmetic for the testbenches.
//
// Values are widened exactly to double precision, combined with the
// simulator's real arithmetic and rounded back to float32 (nearest-even),
// which gives correctly rounded float32 results for +, -, * and / because
// double carries more than twice float32's precision. Subnormal inputs and
// results are treated as zero, as in the design. Remainders are found
// exactly in double for quotients below 2^29. Also: random float helpers.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic real f2r(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) d = {x[31], 63'd0};
    else if (x[30:23] == 8'hFF) d = {x[31], 11'h7FF, x[22:0], 29'd0};
    else d = {x[31], 11'(x[30:23]) - 11'd127 + 11'd1023, x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    logic up;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != '0) ? QNAN : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    up = d[28] && ((d[27:0] != '0) || d[29]);
    m  = m + 25'(up);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] ref_sub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 0 && b[30:23] == 0) return QNAN;
    return r2f(f2r(a) / f2r(b));
  endfunction
  function automatic logic [31:0] ref_mac(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    return ref_add(ref_mul(a, b), c);
  endfunction
  function automatic logic [31:0] ref_half(logic [31:0] a);
    return r2f(f2r(a) / 2.0);
  endfunction
  function automatic logic [31:0] ref_rcp(logic [31:0] a);
    return ref_div(32'h3F80_0000, a);
  endfunction

  // Remainder with the sign of a; finite a, finite non-zero b, |a/b| < 2^29
  function automatic logic [31:0] ref_rem(logic [31:0] a, logic [31:0] b);
    real x, y, q, r;
    logic [31:0] res;
    x = f2r({1'b0, a[30:0]});
    y = f2r({1'b0, b[30:0]});
    q = $floor(x / y);
    r = x - q * y;
    if (r < 0.0) r = r + y;
    if (r >= y) r = r - y;
    res = r2f(r);
    return {a[31], res[30:0]};
  endfunction

  // Floored modulus with the sign of b
  function automatic logic [31:0] ref_mod(logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    r = ref_rem(a, b);
    if (r[30:23] == 0) return {b[31], 31'd0};
    if (r[31] == b[31]) return r;
    return ref_add(r, b);
  endfunction

  // Reference result of one coprocessor operation
  function automatic logic [31:0] ref_op(fpu_pkg::fpu_op_e op, logic [31:0] a, logic [31:0] b,
                                         logic [31:0] c);
    case (op)
      fpu_pkg::OP_ADD:    return ref_add(a, b);
      fpu_pkg::OP_SUB:    return ref_sub(a, b);
      fpu_pkg::OP_MUL:    return ref_mul(a, b);
      fpu_pkg::OP_MAC:    return ref_mac(a, b, c);
      fpu_pkg::OP_DIV:    return ref_div(a, b);
      fpu_pkg::OP_DIVBY2: return ref_half(a);
      fpu_pkg::OP_MOD:    return ref_mod(a, b);
      fpu_pkg::OP_REM:    return ref_rem(a, b);
      fpu_pkg::OP_RCP:    return ref_rcp(a);
      default:            return 32'd0;
    endcase
  endfunction

  // Random normal float with biased exponent in [elo, ehi]
  function automatic logic [31:0] rand_fp(int elo, int ehi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(elo + int'($urandom % 32'(ehi - elo + 1)));
    f[22:0]  = 23'($urandom);
    if ($urandom % 4 == 0) f[11:0] = '0;  // some short significands
    return f;
  endfunction

endpackage
