// tb_fpu_pr_region: self-checking testbench for fpu_pr_region.
//
// Loads each configuration in turn (with a region reset between, as a swap
// does), runs an operation through the shared ports and checks the result
// and the compute-flag width of the connected module; checks that NOP
// answers nothing and that a start reaches only the loaded module (after a
// swap back, the module that was not loaded still holds its reset value).
module tb_fpu_pr_region;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  fpu_op_e     loaded_op = OP_NOP;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0, c = '0, d;
  logic        busy, valid;
  int checks = 0, failures = 0;

  fpu_pr_region dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic load(input fpu_op_e op);
    @(negedge clk);
    rst_n = 1'b0;
    loaded_op = op;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] tc);
    int width, strobes;
    logic [31:0] exp;
    exp = ref_op(loaded_op, ta, tb_, tc);
    @(negedge clk);
    a = ta; b = tb_; c = tc;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    width = 0;
    strobes = 0;
    while (busy && width < 1000) begin
      width++;
      if (valid) strobes++;
      @(negedge clk);
    end
    if (valid) strobes++;
    expect_eq($sformatf("%s width", loaded_op.name()), 32'(width), 32'(op_delay(loaded_op)));
    expect_eq($sformatf("%s strobe", loaded_op.name()), 32'(strobes), (loaded_op == OP_NOP) ? 0 : 1);
    expect_eq($sformatf("%s d", loaded_op.name()), d, exp);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++) begin
      logic [31:0] x, z;
      load(fpu_op_e'(k % NUM_OPS));
      z = rand_fp(115, 135);
      x = rand_fp(int'(z[30:23]), int'(z[30:23]) + 10);
      run(x, z, rand_fp(115, 140));
    end
    // start reaches only the loaded module
    load(OP_ADD);
    run(32'h412C_0000, 32'h4088_0000, 32'h0);
    expect_eq("ADD 15", d, 32'h4170_0000);
    loaded_op = OP_SUB;  // switch without reset: SUB was cleared by the last load
    @(negedge clk);
    expect_eq("SUB untouched", d, 32'h0);
    loaded_op = OP_ADD;
    @(negedge clk);
    expect_eq("ADD kept", d, 32'h4170_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
