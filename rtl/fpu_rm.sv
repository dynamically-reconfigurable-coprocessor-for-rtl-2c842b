// fpu_rm: one reconfigurable module of the coprocessor's PR region.
//
// Each of the ten configurations of the region (NOP and nine float32
// operations) has the same standardized ports: operands A, B, C, a start
// strobe, the result D, a compute flag and a result strobe. OP picks the
// operation at elaboration; in the FPGA each value of OP is a separate
// partial bitstream.
//
// On start the operands are latched and the combinational operation
// evaluates them. As in the original design, a built-in delay lets the
// combinational result settle before it is published: the compute flag
// (busy) goes high the cycle after start and stays high for DELAY_CYCLES
// cycles; in the cycle it falls, D takes the result and valid pulses for one
// cycle. With the default delays at 16 MHz the flag lasts 3.125 us (MAC
// 3.625 us, RCP 2.625 us), matching the measured compute times. A start
// while busy is ignored. The NOP configuration computes nothing: D stays 0
// and the flag stays low, so any other value on D marks a fault.
//
// Operation mapping: ADD a+b, SUB a-b, MUL a*b, MAC a*b+c (product rounded,
// then sum rounded), DIV a/b, DIVBY2 a/2, MOD floored modulus of a by b,
// REM truncated remainder of a by b, RCP 1/a. Which operands each operation
// reads, and the unfused MAC, are this design's choices.
module fpu_rm
  import fpu_pkg::*;
#(
  parameter fpu_op_e     OP           = OP_ADD,
  parameter int unsigned DELAY_CYCLES = op_delay(OP)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] d,
  output logic        busy,
  output logic        valid
);

  if (OP == OP_NOP) begin : g_nop
    assign d     = '0;
    assign busy  = 1'b0;
    assign valid = 1'b0;
  end else begin : g_op
    localparam int unsigned CW = (DELAY_CYCLES < 2) ? 1 : $clog2(DELAY_CYCLES);

    logic [31:0] a_q, b_q, c_q;
    logic [31:0] y;
    logic [CW-1:0] cnt;

    initial assert (DELAY_CYCLES >= 1) else $error("fpu_rm: DELAY_CYCLES must be at least 1");

    if (OP == OP_ADD || OP == OP_SUB) begin : g_addsub
      fp_addsub u_op (.a(a_q), .b(b_q), .sub(OP == OP_SUB), .y(y));
    end else if (OP == OP_MUL) begin : g_mul
      fp_mul u_op (.a(a_q), .b(b_q), .y(y));
    end else if (OP == OP_MAC) begin : g_mac
      logic [31:0] p;
      fp_mul    u_mul (.a(a_q), .b(b_q), .y(p));
      fp_addsub u_add (.a(p), .b(c_q), .sub(1'b0), .y(y));
    end else if (OP == OP_DIV) begin : g_div
      fp_div u_op (.a(a_q), .b(b_q), .y(y));
    end else if (OP == OP_RCP) begin : g_rcp
      fp_div u_op (.a(FP_ONE), .b(a_q), .y(y));
    end else if (OP == OP_DIVBY2) begin : g_half
      fp_half u_op (.a(a_q), .y(y));
    end else begin : g_modrem
      fp_modrem u_op (.a(a_q), .b(b_q), .is_mod(OP == OP_MOD), .y(y));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_q   <= '0;
        b_q   <= '0;
        c_q   <= '0;
        d     <= '0;
        busy  <= 1'b0;
        valid <= 1'b0;
        cnt   <= '0;
      end else begin
        valid <= 1'b0;
        if (!busy) begin
          if (start) begin
            a_q  <= a;
            b_q  <= b;
            c_q  <= c;
            busy <= 1'b1;
            cnt  <= CW'(DELAY_CYCLES - 1);
          end
        end else if (cnt == '0) begin
          busy  <= 1'b0;
          d     <= y;
          valid <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
