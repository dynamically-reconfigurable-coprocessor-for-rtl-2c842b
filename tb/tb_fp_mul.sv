// tb_fp_mul: self-checking testbench for fp_mul.
//
// Applies the worked example of the original test program, special values
// and random operands, and compares every result bit-exactly with the
// reference arithmetic of fp_ref_pkg. A watchdog ends the run if it hangs.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  fp_mul dut (.a(a), .b(b), .y(y));
  function automatic logic [31:0] REF(logic [31:0] x, logic [31:0] z);
    return ref_mul(x, z);
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
    check(32'h40D0_0000, 32'h4088_0000, 32'h41DD_0000);  // 6.5 * 4.25 = 27.625
    foreach (s[i]) foreach (s[j]) check(s[i], s[j], REF(s[i], s[j]));
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, z;
      x = rand_fp(64, 190);
      z = rand_fp(64, 190);
      check(x, z, REF(x, z));
    end
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);  // overflow to inf
    check(32'h0100_0000, 32'h3E80_0000, 32'h0000_0000);  // underflow flushed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
