// fpu_pr_region: the coprocessor's reconfigurable partition.
//
// The region has one set of standardized ports (operands A, B, C, start,
// result D, compute flag busy, result strobe valid) and holds one
// configuration at a time: NOP or one of the nine float32 operations. In the
// FPGA the configuration is a partial bitstream; here all ten modules are
// present and loaded_op connects one of them to the ports, so a swap is a
// change of loaded_op plus a reset of the region (rst_n low during the swap,
// which clears every module as loading a bitstream would). Only the
// connected module sees start. Timing is that of the connected fpu_rm.
// Keeping all modules side by side is this design's way of making the swap
// simulatable; it is larger than the single-module region of the FPGA.
module fpu_pr_region
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fpu_op_e     loaded_op,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] d,
  output logic        busy,
  output logic        valid
);

  logic [31:0] d_m     [NUM_OPS];
  logic        busy_m  [NUM_OPS];
  logic        valid_m [NUM_OPS];

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_rm
    fpu_rm #(.OP(fpu_op_e'(i))) u_rm (
      .clk  (clk),
      .rst_n(rst_n),
      .start(start && (loaded_op == fpu_op_e'(i))),
      .a    (a),
      .b    (b),
      .c    (c),
      .d    (d_m[i]),
      .busy (busy_m[i]),
      .valid(valid_m[i])
    );
  end

  always_comb begin
    d     = '0;
    busy  = 1'b0;
    valid = 1'b0;
    for (int i = 0; i < NUM_OPS; i++) begin
      if (loaded_op == fpu_op_e'(i)) begin
        d     = d_m[i];
        busy  = busy_m[i];
        valid = valid_m[i];
      end
    end
  end

endmodule
