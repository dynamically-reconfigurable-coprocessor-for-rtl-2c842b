// tb_fp_modrem: self-checking testbench for fp_modrem.
//
// Applies the worked example of the original test program, special values
// and random operands, and compares every result bit-exactly with the
// reference arithmetic of fp_ref_pkg. A watchdog ends the run if it hangs.
module tb_fp_modrem;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic is_mod;
  fp_modrem dut (.a(a), .b(b), .is_mod(is_mod), .y(y));
  function automatic logic [31:0] REF(logic [31:0] x, logic [31:0] z);
    if (x[30:23] == 8'hFF || z[30:23] == 8'hFF || z[30:23] == 0 || x[30:23] == 0) return sp(x, z);
    return is_mod ? ref_mod(x, z) : ref_rem(x, z);
  endfunction
  // special operands: NaN for NaN/inf a/zero b; b = inf keeps a (modulus
  // with opposite signs gives b); zero a keeps a (modulus: signed like b)
  function automatic logic [31:0] sp(logic [31:0] x, logic [31:0] z);
    if (x[30:23] == 8'hFF || z[30:23] == 0 || (z[30:23] == 8'hFF && z[22:0] != 0)) return QNAN;
    if (x[30:23] == 0) return is_mod ? {z[31], 31'd0} : {x[31], 31'd0};
    if (is_mod && x[31] != z[31]) return z;
    return x;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    logic [31:0] s [8];
    s = '{32'h0000_0000, 32'h8000_0000, 32'h7F80_0000, 32'hFF80_0000,
          32'h7FC0_0000, 32'h3F80_0000, 32'hC040_0000, 32'h0000_0001};
    is_mod = 1'b1;
    check(32'h4180_0000, 32'h40A0_0000, 32'h3F80_0000);  // 16 mod 5 = 1
    check(32'hC180_0000, 32'h40A0_0000, 32'h4080_0000);  // -16 mod 5 = 4
    is_mod = 1'b0;
    check(32'h4170_0000, 32'h4080_0000, 32'h4040_0000);  // rem 15 / 4 = 3
    check(32'hC180_0000, 32'h40A0_0000, 32'hBF80_0000);  // rem -16 / 5 = -1
    is_mod = 1'b1;
    foreach (s[i]) foreach (s[j]) check(s[i], s[j], REF(s[i], s[j]));
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, z;
      is_mod = 1'($urandom);
      z = rand_fp(100, 140);
      x = rand_fp(int'(z[30:23]) - 3, int'(z[30:23]) + 27);
      check(x, z, REF(x, z));
    end
    is_mod = 1'b0;
    check(32'h7F00_0000, 32'h01C0_0000, 32'h0100_0000);  // 2^127 rem 1.5*2^-124: 251-bit quotient
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
