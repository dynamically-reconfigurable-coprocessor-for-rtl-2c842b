// tb_pr_controller: self-checking testbench for pr_controller.
//
// With a short PR_CYCLES it checks: NOP after reset, the swap length (pr_busy
// high for exactly PR_CYCLES cycles), loaded_op reading NOP and region_rst high during a
// swap, the new operation afterwards, a request during a swap ignored, and
// an invalid operation code ignored.
module tb_pr_controller;
  import fpu_pkg::*;

  localparam int unsigned PRC = 37;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    swap_req = 1'b0;
  fpu_op_e req_op = OP_NOP;
  fpu_op_e loaded_op;
  logic    pr_busy, region_rst;
  int checks = 0, failures = 0;

  pr_controller #(.PR_CYCLES(PRC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // Request a swap; returns the cycles from the request edge until ready
  task automatic swap(input logic [3:0] op, output int cycles);
    int n;
    @(negedge clk);
    req_op = fpu_op_e'(op);
    swap_req = 1'b1;
    @(negedge clk);
    swap_req = 1'b0;
    n = 0;
    while (pr_busy && n < 5000) begin
      if (loaded_op != OP_NOP || !region_rst) begin
        failures++;
        $display("FAIL region visible during swap");
      end
      if (n == 5) begin  // a second request while busy is ignored
        req_op = OP_ADD;
        swap_req = 1'b1;
      end
      if (n == 6) swap_req = 1'b0;
      n++;
      @(negedge clk);
    end
    cycles = n;
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("reset op", loaded_op, OP_NOP);
    expect_eq("reset busy", pr_busy, 0);
    for (int op = 1; op <= 9; op++) begin
      swap(4'(op), cyc);
      expect_eq($sformatf("swap %0d length", op), cyc, PRC);
      expect_eq($sformatf("swap %0d loaded", op), loaded_op, op);
      expect_eq("region released", region_rst, 0);
    end
    swap(4'd0, cyc);
    expect_eq("swap to NOP", loaded_op, OP_NOP);
    swap(4'd3, cyc);
    // invalid code
    @(negedge clk);
    req_op = fpu_op_e'(4'd12);
    swap_req = 1'b1;
    @(negedge clk);
    swap_req = 1'b0;
    @(negedge clk);
    expect_eq("invalid ignored busy", pr_busy, 0);
    expect_eq("invalid ignored op", loaded_op, OP_MUL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
