// tb_fp_half: self-checking testbench for fp_half (division by two).
//
// Checks the worked example of the original test program, special values,
// the flush of results below the normal range and random operands against
// the reference arithmetic of fp_ref_pkg.
module tb_fp_half;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_half dut (.a(a), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] exp);
    a = ta;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h got=%h exp=%h", ta, y, exp);
    end
  endtask

  initial begin
    check(32'h421F_AA3D, ref_half(32'h421F_AA3D));  // 39.91625 / 2 = 19.958125
    check(32'h4280_0000, 32'h4200_0000);           // 64 / 2 = 32
    check(32'h0000_0000, 32'h0000_0000);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'hFF80_0000, 32'hFF80_0000);
    check(32'h7FC0_0001, 32'h7FC0_0000);
    check(32'h0080_0000, 32'h0000_0000);           // would be subnormal
    check(32'h8100_0000, 32'h8080_0000);
    for (int k = 0; k < 5000; k++) begin
      logic [31:0] x;
      x = rand_fp(2, 254);
      check(x, ref_half(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
