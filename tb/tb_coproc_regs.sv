// tb_coproc_regs: self-checking testbench for coproc_regs.
//
// Acts as both the CPU (bus writes and reads) and the region (result strobe,
// status inputs). Checks operand read-back, the read-only D, the CTRL
// operation field, one-cycle swap and start pulses, start refused during a
// swap or a computation, result capture with the sticky done bit, and every
// STATUS field.
module tb_coproc_regs;
  import fpu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        bus_sel = 1'b0, bus_we = 1'b0;
  logic [4:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [31:0] op_a, op_b, op_c;
  fpu_op_e     req_op;
  logic        swap_req, start;
  logic        res_valid = 1'b0;
  logic [31:0] res_d = '0;
  fpu_op_e     loaded_op = OP_NOP;
  logic        pr_busy = 1'b0, busy = 1'b0;
  int checks = 0, failures = 0;
  int swaps = 0, starts = 0;

  coproc_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && swap_req) swaps++;
    if (rst_n && start) starts++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [4:0] addr, input logic [31:0] data);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = 1'b1; bus_addr = addr; bus_wdata = data;
    @(negedge clk);
    bus_sel = 1'b0; bus_we = 1'b0;
    @(negedge clk);  // the pulses follow the write by one cycle
  endtask

  task automatic rd(input logic [4:0] addr, output logic [31:0] data);
    @(negedge clk);
    bus_sel = 1'b1; bus_addr = addr;
    #1 data = bus_rdata;
    @(negedge clk);
    bus_sel = 1'b0;
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(REG_A, 32'h412C_0000);
    wr(REG_B, 32'h4088_0000);
    wr(REG_C, 32'h3F40_0000);
    rd(REG_A, v); expect_eq("A", v, 32'h412C_0000);
    rd(REG_B, v); expect_eq("B", v, 32'h4088_0000);
    rd(REG_C, v); expect_eq("C", v, 32'h3F40_0000);
    expect_eq("op ports", op_a ^ op_b ^ op_c, 32'h412C_0000 ^ 32'h4088_0000 ^ 32'h3F40_0000);
    wr(REG_D, 32'hDEAD_BEEF);
    rd(REG_D, v); expect_eq("D read-only", v, 32'h0);
    // swap request
    wr(REG_CTRL, 32'(OP_ADD) | (32'd1 << CTRL_SWAP_BIT));
    expect_eq("swap pulses", 32'(swaps), 1);
    expect_eq("req_op", 32'(req_op), 32'(OP_ADD));
    rd(REG_CTRL, v); expect_eq("CTRL readback", v, 32'(OP_ADD));
    pr_busy = 1'b1;
    rd(REG_STATUS, v); expect_eq("STATUS swapping", v, 32'h10);
    wr(REG_CTRL, 32'(OP_ADD) | (32'd1 << CTRL_START_BIT));
    expect_eq("start refused during swap", 32'(starts), 0);
    pr_busy = 1'b0;
    loaded_op = OP_ADD;
    rd(REG_STATUS, v); expect_eq("STATUS ready", v, 32'h21);
    wr(REG_CTRL, 32'(OP_ADD) | (32'd1 << CTRL_START_BIT));
    expect_eq("start pulses", 32'(starts), 1);
    busy = 1'b1;
    wr(REG_CTRL, 32'(OP_ADD) | (32'd1 << CTRL_START_BIT));
    expect_eq("start refused while busy", 32'(starts), 1);
    rd(REG_STATUS, v); expect_eq("STATUS busy", v, 32'h61);
    @(negedge clk);
    busy = 1'b0; res_valid = 1'b1; res_d = 32'h4170_0000;
    @(negedge clk);
    res_valid = 1'b0; res_d = 32'h0;
    rd(REG_D, v); expect_eq("D result", v, 32'h4170_0000);
    rd(REG_STATUS, v); expect_eq("STATUS done", v, 32'hA1);
    wr(REG_CTRL, 32'(OP_ADD) | (32'd1 << CTRL_START_BIT));
    rd(REG_STATUS, v); expect_eq("done cleared by start", v, 32'h21);
    rd(REG_D, v); expect_eq("D held", v, 32'h4170_0000);
    expect_eq("swap count", 32'(swaps), 1);
    rd(5'h1C, v); expect_eq("unmapped", v, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
