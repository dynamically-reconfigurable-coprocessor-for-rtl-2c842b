// coproc_regs: memory-mapped registers of the floating-point coprocessor.
//
// The CPU sees the coprocessor as an ordinary peripheral; these registers
// sit between its bus and the reconfigurable region, so operands and results
// never pass through shared data memory and a swap cannot disturb memory
// accesses. Register map (byte offsets, 32-bit words; this design's choice):
//   0x00 A, 0x04 B, 0x08 C   operands, read/write
//   0x0C D                   last result, read-only, held until the next one
//   0x10 CTRL   [3:0] requested operation (read/write),
//               [8] write 1: request a swap to that operation,
//               [9] write 1: start the loaded operation (both read as 0)
//   0x14 STATUS [3:0] loaded operation, [4] swap in progress,
//               [5] ready (an operation other than NOP is loaded, no swap),
//               [6] computing, [7] done (set by a result, cleared by start)
// Bus: bus_sel with bus_we writes bus_wdata at bus_addr at the clock edge;
// bus_rdata is combinational from bus_addr. swap_req and start are one-cycle
// pulses in the cycle after the write. A start is only issued when no swap
// and no computation is running.
module coproc_regs
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [4:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic [31:0] op_a,
  output logic [31:0] op_b,
  output logic [31:0] op_c,
  output fpu_op_e     req_op,
  output logic        swap_req,
  output logic        start,
  input  logic        res_valid,
  input  logic [31:0] res_d,
  input  fpu_op_e     loaded_op,
  input  logic        pr_busy,
  input  logic        busy
);

  logic [31:0] d_q;
  logic        done_q;
  logic        wr;
  logic [31:0] status;

  assign wr = bus_sel && bus_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a     <= '0;
      op_b     <= '0;
      op_c     <= '0;
      req_op   <= OP_NOP;
      swap_req <= 1'b0;
      start    <= 1'b0;
      d_q      <= '0;
      done_q   <= 1'b0;
    end else begin
      swap_req <= 1'b0;
      start    <= 1'b0;
      if (wr) begin
        case (bus_addr)
          REG_A: op_a <= bus_wdata;
          REG_B: op_b <= bus_wdata;
          REG_C: op_c <= bus_wdata;
          REG_CTRL: begin
            req_op   <= fpu_op_e'(bus_wdata[3:0]);
            swap_req <= bus_wdata[CTRL_SWAP_BIT];
            if (bus_wdata[CTRL_START_BIT] && !pr_busy && !busy && !start) begin
              start  <= 1'b1;
              done_q <= 1'b0;
            end
          end
          default: ;
        endcase
      end
      if (res_valid) begin
        d_q    <= res_d;
        done_q <= 1'b1;
      end
    end
  end

  always_comb begin
    status = '0;
    status[3:0]            = loaded_op;
    status[ST_PR_BUSY_BIT] = pr_busy;
    status[ST_READY_BIT]   = !pr_busy && (loaded_op != OP_NOP);
    status[ST_BUSY_BIT]    = busy;
    status[ST_DONE_BIT]    = done_q;
    case (bus_addr)
      REG_A:      bus_rdata = op_a;
      REG_B:      bus_rdata = op_b;
      REG_C:      bus_rdata = op_c;
      REG_D:      bus_rdata = d_q;
      REG_CTRL:   bus_rdata = {28'd0, req_op};
      REG_STATUS: bus_rdata = status;
      default:    bus_rdata = '0;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy && !pr_busy);

endmodule
