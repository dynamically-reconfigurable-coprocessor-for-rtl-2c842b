// tb_fp_addsub: self-checking testbench for fp_addsub.
//
// Applies the worked example of the original test program, special values
// and random operands, and compares every result bit-exactly with the
// reference arithmetic of fp_ref_pkg. A watchdog ends the run if it hangs.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic sub;
  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));
  function automatic logic [31:0] REF(logic [31:0] x, logic [31:0] z);
    return sub ? ref_sub(x, z) : ref_add(x, z);
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
    sub = 1'b0;
    check(32'h412C_0000, 32'h4088_0000, 32'h4170_0000);  // 10.75 + 4.25 = 15
    sub = 1'b1;
    check(32'h412C_0000, 32'h4088_0000, 32'h40D0_0000);  // 10.75 - 4.25 = 6.5
    check(32'h3F80_0001, 32'h3F80_0000, 32'h3400_0000);  // cancellation
    foreach (s[i]) foreach (s[j]) check(s[i], s[j], REF(s[i], s[j]));
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, z;
      sub = 1'($urandom);
      x = rand_fp(100, 150);
      z = (k % 3 == 0) ? {1'($urandom), x[30:23] - 8'($urandom % 3), 23'($urandom)} : rand_fp(100, 150);
      check(x, z, REF(x, z));
    end
    sub = 1'b0;
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);  // overflow
    check(32'h0080_0001, 32'h8080_0000, 32'h0000_0000);  // result below normal range
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
