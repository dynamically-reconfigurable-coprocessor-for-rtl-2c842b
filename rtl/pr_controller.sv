// pr_controller: stand-in for the partial reconfiguration of the coprocessor
// region.
//
// In the FPGA a swap loads a partial bitstream through the configuration
// port; while it runs the region holds no working logic, and afterwards the
// new module starts from its initial state, which also clears any upset in
// the region. This block reproduces that behaviour cycle for cycle so the
// rest of the system can be simulated and built: a swap request for a valid
// operation code (NOP to RCP) starts a swap: from the next clock edge
// pr_busy is high for exactly PR_CYCLES cycles. During it the loaded
// operation reads as NOP and region_rst holds the region in reset; in the
// edge that ends it loaded_op becomes the requested operation and pr_busy falls.
// Requests during a swap and invalid codes are ignored. After reset the
// region holds NOP. PR_CYCLES defaults to 250 ms at 16 MHz, the measured
// swap time; the swap mechanism itself (bitstream storage and transfer) is
// outside this design.
module pr_controller
  import fpu_pkg::*;
#(
  parameter int unsigned PR_CYCLES = PR_CYCLES_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    swap_req,
  input  fpu_op_e req_op,
  output fpu_op_e loaded_op,
  output logic    pr_busy,
  output logic    region_rst
);

  localparam int unsigned CW = (PR_CYCLES < 2) ? 1 : $clog2(PR_CYCLES);

  logic [CW-1:0] cnt;
  fpu_op_e       pending;
  logic          req_ok;

  initial assert (PR_CYCLES >= 2) else $error("pr_controller: PR_CYCLES must be at least 2");

  assign req_ok     = swap_req && !pr_busy && (req_op <= OP_RCP);
  assign region_rst = pr_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded_op <= OP_NOP;
      pending   <= OP_NOP;
      pr_busy   <= 1'b0;
      cnt       <= '0;
    end else if (req_ok) begin
      pending   <= req_op;
      loaded_op <= OP_NOP;
      pr_busy   <= 1'b1;
      cnt       <= CW'(PR_CYCLES - 1);
    end else if (pr_busy) begin
      if (cnt == '0) begin
        loaded_op <= pending;
        pr_busy   <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pr_busy |-> loaded_op == OP_NOP);

endmodule
