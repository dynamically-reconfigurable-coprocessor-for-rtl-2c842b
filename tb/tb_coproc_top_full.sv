// tb_coproc_top_full: the complete test program at full size.
//
// coproc_top runs with its default parameters, so every swap takes the full
// 4,000,000 cycles (250 ms at 16 MHz). For each of the nine operations the
// testbench requests the swap, waits for it, loads the worked example of the
// original test program into A, B and C, starts the operation, waits for the
// result and checks it, the swap length on pr_active and the compute-flag
// length (3.125 us, MAC 3.625 us, RCP 2.625 us at 16 MHz).
module tb_coproc_top_full;
  import fpu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        bus_sel = 1'b0, bus_we = 1'b0;
  logic [4:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        pr_active, pr_done, compute_flag;
  int checks = 0, failures = 0;
  int pr_len = 0, flag_len = 0, last_pr_len = 0, last_flag_len = 0;

  coproc_top dut (.*);

  always #31.25ns clk = ~clk;  // 16 MHz

  always @(posedge clk) begin
    if (pr_active) pr_len <= pr_len + 1;
    else if (pr_len != 0) begin
      last_pr_len <= pr_len;
      pr_len <= 0;
    end
    if (compute_flag) flag_len <= flag_len + 1;
    else if (flag_len != 0) begin
      last_flag_len <= flag_len;
      flag_len <= 0;
    end
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
  endtask

  task automatic rd(input logic [4:0] addr, output logic [31:0] data);
    @(negedge clk);
    bus_sel = 1'b1; bus_addr = addr;
    #1 data = bus_rdata;
    @(negedge clk);
    bus_sel = 1'b0;
  endtask

  task automatic program_step(input fpu_op_e op, input logic [31:0] a, input logic [31:0] b,
                              input logic [31:0] c, input logic [31:0] exp);
    logic [31:0] st, d;
    wr(REG_A, a);
    wr(REG_B, b);
    wr(REG_C, c);
    wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_SWAP_BIT));
    @(negedge clk);
    wait (!pr_active);  // the DONE-pin equivalent
    rd(REG_STATUS, st);
    expect_eq($sformatf("%s ready", op.name()), st[6:0], 7'h20 | 7'(op));  // done may still show the last result
    expect_eq($sformatf("%s swap cycles", op.name()), 32'(last_pr_len), PR_CYCLES_DEFAULT);
    wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_START_BIT));
    do rd(REG_STATUS, st); while (!st[ST_DONE_BIT]);
    rd(REG_D, d);
    expect_eq($sformatf("%s result", op.name()), d, exp);
    expect_eq($sformatf("%s flag cycles", op.name()), 32'(last_flag_len), 32'(op_delay(op)));
    $display("%s done: D=%h after %0d swap cycles, flag %0d cycles", op.name(), d,
             last_pr_len, last_flag_len);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    program_step(OP_ADD, 32'h412C_0000, 32'h4088_0000, 32'h0, 32'h4170_0000);        // 15
    program_step(OP_SUB, 32'h412C_0000, 32'h4088_0000, 32'h0, 32'h40D0_0000);        // 6.5
    program_step(OP_MUL, 32'h40D0_0000, 32'h4088_0000, 32'h0, 32'h41DD_0000);        // 27.625
    program_step(OP_MAC, 32'h4000_0000, 32'h40A0_0000, 32'h3F40_0000, 32'h412C_0000); // 10.75
    program_step(OP_DIV, 32'h439F_AA3D, 32'h40D0_0000, 32'h0,
                 fp_ref_pkg::ref_div(32'h439F_AA3D, 32'h40D0_0000));                  // 49.1277
    program_step(OP_DIVBY2, 32'h421F_AA3D, 32'h0, 32'h0, 32'h419F_AA3D);              // 19.958
    program_step(OP_MOD, 32'h4180_0000, 32'h40A0_0000, 32'h0, 32'h3F80_0000);        // 1
    program_step(OP_REM, 32'h4170_0000, 32'h4080_0000, 32'h0, 32'h4040_0000);        // 3
    program_step(OP_RCP, 32'h40A0_0000, 32'h0, 32'h0, 32'h3E4C_CCCD);                // 0.2
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
