// coproc_top: dynamically reconfigurable floating-point coprocessor, as a
// memory-mapped peripheral of a radiation-tolerant RISC-V computer.
//
// The integer-only host CPU gains float32 arithmetic from a single
// reconfigurable region that holds one operation at a time (NOP, ADD, SUB,
// MUL, MAC, DIV, DIVBY2, MOD, REM, RCP). Instead of holding all nine
// operations in fabric, the region is swapped by partial reconfiguration
// before each operation. A program using it:
//   1. writes the operands to A, B and/or C;
//   2. writes CTRL with the operation and the swap bit;
//   3. polls STATUS until the swap is over (about 250 ms on the original
//      hardware, PR_CYCLES cycles here);
//   4. writes CTRL with the start bit;
//   5. polls STATUS.done and reads D.
// compute_flag is high exactly while an operation computes (routed to a pin
// for timing measurement); pr_done is low while a swap runs, like the FPGA's
// configuration DONE pin. The host computer itself and the bitstream
// transfer path are outside this design: the top brings out the
// peripheral's side of the CPU bus (see coproc_regs for the register map
// and bus timing) and pr_controller stands in for the swap.
module coproc_top
  import fpu_pkg::*;
#(
  parameter int unsigned PR_CYCLES = PR_CYCLES_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [4:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        pr_active,
  output logic        pr_done,
  output logic        compute_flag
);

  logic [31:0] op_a, op_b, op_c, res_d;
  fpu_op_e     req_op, loaded_op;
  logic        swap_req, start, res_valid, pr_busy, region_rst, busy;

  coproc_regs u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .bus_sel  (bus_sel),
    .bus_we   (bus_we),
    .bus_addr (bus_addr),
    .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata),
    .op_a     (op_a),
    .op_b     (op_b),
    .op_c     (op_c),
    .req_op   (req_op),
    .swap_req (swap_req),
    .start    (start),
    .res_valid(res_valid),
    .res_d    (res_d),
    .loaded_op(loaded_op),
    .pr_busy  (pr_busy),
    .busy     (busy)
  );

  pr_controller #(.PR_CYCLES(PR_CYCLES)) u_pr (
    .clk       (clk),
    .rst_n     (rst_n),
    .swap_req  (swap_req),
    .req_op    (req_op),
    .loaded_op (loaded_op),
    .pr_busy   (pr_busy),
    .region_rst(region_rst)
  );

  fpu_pr_region u_region (
    .clk      (clk),
    .rst_n    (rst_n && !region_rst),
    .loaded_op(loaded_op),
    .start    (start),
    .a        (op_a),
    .b        (op_b),
    .c        (op_c),
    .d        (res_d),
    .busy     (busy),
    .valid    (res_valid)
  );

  assign pr_active    = pr_busy;
  assign pr_done      = !pr_busy;
  assign compute_flag = busy;

endmodule
