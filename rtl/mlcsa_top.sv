// mlcsa_top -- multi-operand carry-save addition on FPGA carry chains.
//
// Three multi-operand adders stand side by side, each with its own operand
// port, each ending in a final carry-propagate adder (cpa) that turns the
// carry-save result into a binary sum:
//   bin_*  : NOP_BIN:2 linear array of 3:2 carry-save adders, for FPGAs
//            with binary carry chains (default 9 operands, combinational);
//   ter_*  : NOP_TER:2 linear array of 5:3 compressor arrays, for FPGAs
//            with ternary adders (default 11 operands, combinational);
//   pipe_* : NOP_PIPE:2 tree pipelined into PIPE_STAGES register stages of
//            small linear arrays (default 18 operands, two stages of 6:2
//            blocks, result PIPE_STAGES cycles after pipe_in_valid).
// The carry-save outputs (*_sum_w, *_carry_w) are brought out as well as
// the binary results, for users that keep the redundant form.
//
// STRUCTURAL selects how the two combinational trees are described:
// 0 (default) writes them as arrays of carry-propagate / ternary adders
// (csa_linear_array_cpa, csa_linear_array_tern), which FPGA synthesis maps
// onto the dedicated carry logic; 1 writes them as rows of full adders and
// 5:3 compressors (csa_linear_array, csa_linear_array_53).  Both compute the
// same bits.
//
// All arithmetic is modulo 2^N: operands must be sign or zero extended
// beforehand so that the sum fits in N bits.  Operand counts of 9, 11 and
// 18 and the 16-bit width are the examples the design is presented with;
// putting the three variants into one top is this implementation's choice.
module mlcsa_top #(
  parameter int N           = 16,  // word width
  parameter int NOP_BIN     = 9,   // operands of the binary linear array
  parameter int NOP_TER     = 11,  // operands of the ternary linear array
  parameter int NOP_PIPE    = 18,  // operands of the pipelined tree
  parameter int PIPE_STAGES = 2,   // register stages of the pipelined tree
  parameter bit STRUCTURAL  = 1'b0 // 1: full-adder level descriptions
) (
  input  logic         clk,
  input  logic         rst_n,                 // synchronous, active low
  // binary linear array
  input  logic [N-1:0] bin_ops [NOP_BIN],
  output logic [N-1:0] bin_sum_w,
  output logic [N-1:0] bin_carry_w,
  output logic [N-1:0] bin_result,
  // ternary (5:3) linear array
  input  logic [N-1:0] ter_ops [NOP_TER],
  output logic [N-1:0] ter_sum_w,
  output logic [N-1:0] ter_carry_w,
  output logic [N-1:0] ter_result,
  // pipelined tree
  input  logic         pipe_in_valid,
  input  logic [N-1:0] pipe_ops [NOP_PIPE],
  output logic         pipe_out_valid,
  output logic [N-1:0] pipe_sum_w,
  output logic [N-1:0] pipe_carry_w,
  output logic [N-1:0] pipe_result
);

  if (STRUCTURAL) begin : g_fa_level
    csa_linear_array #(.NOP(NOP_BIN), .N(N)) u_bin (
      .ops(bin_ops), .sum_w(bin_sum_w), .carry_w(bin_carry_w)
    );
    csa_linear_array_53 #(.NOP(NOP_TER), .N(N)) u_ter (
      .ops(ter_ops), .sum_w(ter_sum_w), .carry_w(ter_carry_w)
    );
  end else begin : g_adder_level
    csa_linear_array_cpa #(.NOP(NOP_BIN), .N(N)) u_bin (
      .ops(bin_ops), .sum_w(bin_sum_w), .carry_w(bin_carry_w)
    );
    csa_linear_array_tern #(.NOP(NOP_TER), .N(N)) u_ter (
      .ops(ter_ops), .sum_w(ter_sum_w), .carry_w(ter_carry_w)
    );
  end

  pipelined_csa_tree #(.NOP(NOP_PIPE), .N(N), .STAGES(PIPE_STAGES)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pipe_in_valid),
    .ops      (pipe_ops),
    .out_valid(pipe_out_valid),
    .sum_w    (pipe_sum_w),
    .carry_w  (pipe_carry_w)
  );

  cpa #(.N(N)) u_bin_cpa (
    .sum_w(bin_sum_w), .carry_w(bin_carry_w), .result(bin_result), .cout()
  );
  cpa #(.N(N)) u_ter_cpa (
    .sum_w(ter_sum_w), .carry_w(ter_carry_w), .result(ter_result), .cout()
  );
  cpa #(.N(N)) u_pipe_cpa (
    .sum_w(pipe_sum_w), .carry_w(pipe_carry_w), .result(pipe_result), .cout()
  );

endmodule
