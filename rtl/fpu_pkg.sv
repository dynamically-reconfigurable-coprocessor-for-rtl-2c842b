// fpu_pkg: types, constants and float32 helpers shared by the floating-point
// coprocessor.
//
// The coprocessor offers nine single-precision operations plus a NOP
// configuration, each of which is one reconfigurable module of the PR region.
// The operation codes follow the order of the operation list of the design
// (NOP, ADD, SUB, MUL, MAC, DIV, DIVBY2, MOD, REM, RCP); the numeric codes,
// the register map and the per-operation compute delays are this design's
// own choices. The delays are the number of 16 MHz cycles for which each
// operation holds its compute flag, chosen so that the flag widths match the
// measured compute times (3.11 us, MAC 3.61 us, RCP 2.62 us).
//
// Float helpers: every arithmetic unit rounds to nearest-even, flushes
// subnormal inputs and results to a signed zero, and returns the quiet NaN
// 0x7FC00000 for invalid operations.
package fpu_pkg;

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_ADD    = 4'd1,
    OP_SUB    = 4'd2,
    OP_MUL    = 4'd3,
    OP_MAC    = 4'd4,
    OP_DIV    = 4'd5,
    OP_DIVBY2 = 4'd6,
    OP_MOD    = 4'd7,
    OP_REM    = 4'd8,
    OP_RCP    = 4'd9
  } fpu_op_e;

  localparam int unsigned NUM_OPS = 10;  // NOP and nine operations

  // Peripheral register map, byte offsets
  localparam logic [4:0] REG_A      = 5'h00;
  localparam logic [4:0] REG_B      = 5'h04;
  localparam logic [4:0] REG_C      = 5'h08;
  localparam logic [4:0] REG_D      = 5'h0C;
  localparam logic [4:0] REG_CTRL   = 5'h10;
  localparam logic [4:0] REG_STATUS = 5'h14;

  // CTRL bits: [3:0] requested operation, [8] swap request, [9] start
  localparam int unsigned CTRL_SWAP_BIT  = 8;
  localparam int unsigned CTRL_START_BIT = 9;

  // STATUS bits: [3:0] loaded operation, [4] swap in progress, [5] ready,
  // [6] computing, [7] result done (sticky, cleared by start)
  localparam int unsigned ST_PR_BUSY_BIT = 4;
  localparam int unsigned ST_READY_BIT   = 5;
  localparam int unsigned ST_BUSY_BIT    = 6;
  localparam int unsigned ST_DONE_BIT    = 7;

  // 250 ms reconfiguration at a 16 MHz system clock
  localparam int unsigned PR_CYCLES_DEFAULT = 4_000_000;

  // Compute-flag width in clock cycles, per operation
  function automatic int unsigned op_delay(fpu_op_e op);
    case (op)
      OP_NOP:  return 0;
      OP_MAC:  return 58;  // 3.625 us at 16 MHz
      OP_RCP:  return 42;  // 2.625 us at 16 MHz
      default: return 50;  // 3.125 us at 16 MHz
    endcase
  endfunction

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;
  localparam logic [31:0] FP_ONE  = 32'h3F80_0000;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  function automatic logic fp_is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0);
  endfunction

  function automatic logic fp_is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == '0);
  endfunction

  // Zero or subnormal (subnormals are treated as zero)
  function automatic logic fp_is_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  // Significand with the hidden one
  function automatic logic [23:0] fp_sig(logic [31:0] x);
    return {1'b1, x[22:0]};
  endfunction

  // Round to nearest-even and pack. n holds a normalised significand with
  // n[26] = 1, three extra bits (guard, round, sticky) below the 24 kept ones;
  // e is the biased exponent of n[26].
  function automatic logic [31:0] fp_round_pack(logic s, logic signed [11:0] e, logic [26:0] n);
    logic [24:0] m;
    logic signed [11:0] ee;
    logic up;
    up = n[2] & (n[1] | n[0] | n[3]);
    m  = {1'b0, n[26:3]} + 25'(up);
    ee = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 12'sd1;
    end
    if (ee >= 12'sd255) return {s, 8'hFF, 23'd0};
    if (ee <= 12'sd0) return {s, 31'd0};
    return {s, ee[7:0], m[22:0]};
  endfunction

  // Number of leading zeros of a 27-bit value (27 when it is zero)
  function automatic logic [4:0] clz27(logic [26:0] v);
    logic [4:0] n;
    logic found;
    n = 5'd27;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found && v[i]) begin
        n = 5'(26 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

endpackage
