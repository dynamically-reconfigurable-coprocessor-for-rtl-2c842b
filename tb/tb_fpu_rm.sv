// tb_fpu_rm: self-checking testbench for fpu_rm, all ten configurations.
//
// One instance per operation (NOP to RCP) at the default delays. For each,
// operands are applied with a start pulse; the testbench checks that the
// compute flag stays high for exactly the operation's delay, that valid
// pulses once as the flag falls, that D equals the reference result, and
// that a second start or changed operands during the computation do not
// disturb it. The NOP configuration must keep D at 0 and never raise the
// flag. Results include the worked examples of the original test program.
module tb_fpu_rm;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] a, b, c;
  logic        start [NUM_OPS];
  logic [31:0] d     [NUM_OPS];
  logic        busy  [NUM_OPS];
  logic        valid [NUM_OPS];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_dut
    fpu_rm #(.OP(fpu_op_e'(i))) dut (
      .clk(clk), .rst_n(rst_n), .start(start[i]), .a(a), .b(b), .c(c),
      .d(d[i]), .busy(busy[i]), .valid(valid[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Run one operation on instance i and check result, flag width and strobe
  task automatic run(input int i, input logic [31:0] ta, input logic [31:0] tb_,
                     input logic [31:0] tc);
    int width, strobes;
    logic [31:0] exp;
    exp = ref_op(fpu_op_e'(i), ta, tb_, tc);
    @(negedge clk);
    a = ta; b = tb_; c = tc;
    start[i] = 1'b1;
    @(negedge clk);
    start[i] = 1'b0;
    a = ~ta; b = ~tb_; c = ~tc;  // operands were latched at start
    width = 0;
    strobes = 0;
    while (busy[i] && width < 1000) begin
      if (width == 3) start[i] = 1'b1;  // ignored while busy
      if (width == 4) start[i] = 1'b0;
      if (valid[i]) strobes++;
      width++;
      @(negedge clk);
    end
    if (valid[i]) strobes++;
    expect_eq($sformatf("op%0d width", i), 32'(width), 32'(op_delay(fpu_op_e'(i))));
    expect_eq($sformatf("op%0d strobes", i), 32'(strobes), (i == 0) ? 32'd0 : 32'd1);
    expect_eq($sformatf("op%0d d a=%h b=%h c=%h", i, ta, tb_, tc), d[i], exp);
    @(negedge clk);
    expect_eq($sformatf("op%0d idle", i), {31'd0, busy[i]}, 32'd0);
  endtask

  initial begin
    foreach (start[i]) start[i] = 1'b0;
    a = '0; b = '0; c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // worked examples: a, b, c as loaded by the test program
    run(1, 32'h412C_0000, 32'h4088_0000, 32'h0);           // 10.75 + 4.25
    expect_eq("ADD 15.0", d[1], 32'h4170_0000);
    run(2, 32'h412C_0000, 32'h4088_0000, 32'h0);           // 10.75 - 4.25
    expect_eq("SUB 6.5", d[2], 32'h40D0_0000);
    run(3, 32'h40D0_0000, 32'h4088_0000, 32'h0);           // 6.5 * 4.25
    expect_eq("MUL 27.625", d[3], 32'h41DD_0000);
    run(4, 32'h4000_0000, 32'h40A0_0000, 32'h3F40_0000);   // 2 * 5 + 0.75
    expect_eq("MAC 10.75", d[4], 32'h412C_0000);
    run(5, 32'h439F_AA3D, 32'h40D0_0000, 32'h0);           // 319.33 / 6.5
    run(6, 32'h421F_AA3D, 32'h0, 32'h0);                   // 39.91625 / 2
    run(7, 32'h4180_0000, 32'h40A0_0000, 32'h0);           // 16 mod 5
    expect_eq("MOD 1", d[7], 32'h3F80_0000);
    run(8, 32'h4170_0000, 32'h4080_0000, 32'h0);           // rem 15 / 4
    expect_eq("REM 3", d[8], 32'h4040_0000);
    run(9, 32'h40A0_0000, 32'h0, 32'h0);                   // 1 / 5
    expect_eq("RCP 0.2", d[9], 32'h3E4C_CCCD);
    run(0, 32'h4170_0000, 32'h4080_0000, 32'h0);           // NOP
    for (int k = 0; k < 300; k++) begin
      logic [31:0] x, z;
      z = rand_fp(110, 140);
      x = rand_fp(int'(z[30:23]) - 2, int'(z[30:23]) + 20);
      run(k % NUM_OPS, x, z, rand_fp(110, 150));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
