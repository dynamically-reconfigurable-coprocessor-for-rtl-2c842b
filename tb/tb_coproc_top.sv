// tb_coproc_top: end-to-end testbench of the coprocessor peripheral.
//
// The testbench plays the host program: for every operation it loads the
// operands into A, B, C, requests a swap through CTRL, polls STATUS until the
// swap is over, starts the operation, polls for done and reads D, checking
// the result against reference arithmetic. The swap time (pr_active) and the
// compute time (compute_flag) are measured in cycles and checked. It also
// provokes and counts each mechanism of the design: swaps, a start refused
// during a swap, a swap request ignored during a swap, a start while NOP is
// loaded (no result), a start refused during a computation, and results held
// across a swap. Every mechanism must occur at least once. PR_CYCLES is
// shortened to keep the run brief; tb_coproc_top_full runs the default.
module tb_coproc_top;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned PRC = 300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        bus_sel = 1'b0, bus_we = 1'b0;
  logic [4:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        pr_active, pr_done, compute_flag;
  int checks = 0, failures = 0;
  int n_swap = 0, n_compute = 0, n_refused_pr = 0, n_swap_ignored = 0;
  int n_nop_start = 0, n_refused_busy = 0, n_held = 0;
  int pr_len = 0, flag_len = 0, last_pr_len = 0, last_flag_len = 0;

  coproc_top #(.PR_CYCLES(PRC)) dut (.*);

  always #5 clk = ~clk;

  // cycle counters of the two externally visible timing signals
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic swap_to(input fpu_op_e op, input bit poke);
    logic [31:0] st;
    wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_SWAP_BIT));
    rd(REG_STATUS, st);
    expect_eq("swap running", st[ST_PR_BUSY_BIT], 1'b1);
    if (poke) begin
      // start and a second swap request during the swap are both ignored
      wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_START_BIT));
      rd(REG_STATUS, st);
      if (st[ST_BUSY_BIT] == 1'b0 && st[ST_PR_BUSY_BIT]) n_refused_pr++;
      wr(REG_CTRL, 32'(OP_NOP) | (32'd1 << CTRL_SWAP_BIT));
      wr(REG_CTRL, 32'(op));
    end
    do rd(REG_STATUS, st); while (st[ST_PR_BUSY_BIT]);
    @(negedge clk);
    n_swap++;
    expect_eq($sformatf("%s swap cycles", op.name()), 32'(last_pr_len), 32'(PRC));
    expect_eq($sformatf("%s loaded", op.name()), {28'd0, st[3:0]}, 32'(op));
    expect_eq("ready", st[ST_READY_BIT], op != OP_NOP);
    if (poke && st[3:0] == 4'(op)) n_swap_ignored++;
  endtask

  task automatic compute(input fpu_op_e op, input logic [31:0] a, input logic [31:0] b,
                         input logic [31:0] c, input bit poke);
    logic [31:0] st, d, exp;
    exp = ref_op(op, a, b, c);
    wr(REG_A, a);
    wr(REG_B, b);
    wr(REG_C, c);
    wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_START_BIT));
    if (poke) begin
      // change the operands and try to restart while computing
      wr(REG_A, ~a);
      wr(REG_CTRL, 32'(op) | (32'd1 << CTRL_START_BIT));
      rd(REG_STATUS, st);
      if (st[ST_BUSY_BIT]) n_refused_busy++;
    end
    do rd(REG_STATUS, st); while (!st[ST_DONE_BIT]);
    rd(REG_D, d);
    n_compute++;
    expect_eq($sformatf("%s result a=%h b=%h c=%h", op.name(), a, b, c), d, exp);
    expect_eq($sformatf("%s flag cycles", op.name()), 32'(last_flag_len), 32'(op_delay(op)));
  endtask

  initial begin
    logic [31:0] st, d;
    fpu_op_e ops [9];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(REG_STATUS, st);
    expect_eq("NOP after reset", st, 32'h0);

    // start while NOP is loaded: no result appears
    wr(REG_A, 32'h3F80_0000);
    wr(REG_CTRL, 32'(OP_NOP) | (32'd1 << CTRL_START_BIT));
    repeat (80) @(negedge clk);
    rd(REG_STATUS, st);
    if (!st[ST_DONE_BIT] && !compute_flag) n_nop_start++;
    expect_eq("NOP gives no result", st[ST_DONE_BIT], 1'b0);

    // the worked examples of the original test program, one swap each
    swap_to(OP_ADD, 1'b1);
    compute(OP_ADD, 32'h412C_0000, 32'h4088_0000, 32'h0, 1'b1);
    rd(REG_D, d);
    expect_eq("10.75 + 4.25", d, 32'h4170_0000);
    swap_to(OP_SUB, 1'b0);
    rd(REG_D, d);
    if (d == 32'h4170_0000) n_held++;  // the previous result survives the swap
    compute(OP_SUB, 32'h412C_0000, 32'h4088_0000, 32'h0, 1'b0);
    swap_to(OP_MUL, 1'b0);
    compute(OP_MUL, 32'h40D0_0000, 32'h4088_0000, 32'h0, 1'b0);
    swap_to(OP_MAC, 1'b0);
    compute(OP_MAC, 32'h4000_0000, 32'h40A0_0000, 32'h3F40_0000, 1'b0);
    swap_to(OP_DIV, 1'b0);
    compute(OP_DIV, 32'h439F_AA3D, 32'h40D0_0000, 32'h0, 1'b0);
    swap_to(OP_DIVBY2, 1'b0);
    compute(OP_DIVBY2, 32'h421F_AA3D, 32'h0, 32'h0, 1'b0);
    swap_to(OP_MOD, 1'b0);
    compute(OP_MOD, 32'h4180_0000, 32'h40A0_0000, 32'h0, 1'b0);
    swap_to(OP_REM, 1'b0);
    compute(OP_REM, 32'h4170_0000, 32'h4080_0000, 32'h0, 1'b0);
    swap_to(OP_RCP, 1'b0);
    compute(OP_RCP, 32'h40A0_0000, 32'h0, 32'h0, 1'b1);
    rd(REG_D, d);
    expect_eq("1 / 5", d, 32'h3E4C_CCCD);

    // random operations, several per swap
    ops = '{OP_ADD, OP_SUB, OP_MUL, OP_MAC, OP_DIV, OP_DIVBY2, OP_MOD, OP_REM, OP_RCP};
    for (int r = 0; r < 2; r++) begin
      foreach (ops[i]) begin
        swap_to(ops[i], 1'b0);
        for (int k = 0; k < 8; k++) begin
          logic [31:0] x, z;
          z = rand_fp(115, 135);
          x = rand_fp(int'(z[30:23]) - 2, int'(z[30:23]) + 12);
          compute(ops[i], x, z, rand_fp(115, 140), k == 0);
        end
      end
    end

    $display("swaps=%0d computes=%0d start_refused_in_swap=%0d swap_ignored_in_swap=%0d",
             n_swap, n_compute, n_refused_pr, n_swap_ignored);
    $display("start_on_nop=%0d start_refused_busy=%0d result_held_over_swap=%0d",
             n_nop_start, n_refused_busy, n_held);
    expect_eq("mechanism swap", n_swap > 0, 1);
    expect_eq("mechanism compute", n_compute > 0, 1);
    expect_eq("mechanism start refused in swap", n_refused_pr > 0, 1);
    expect_eq("mechanism swap ignored in swap", n_swap_ignored > 0, 1);
    expect_eq("mechanism start on NOP", n_nop_start > 0, 1);
    expect_eq("mechanism start refused busy", n_refused_busy > 0, 1);
    expect_eq("mechanism result held", n_held > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
