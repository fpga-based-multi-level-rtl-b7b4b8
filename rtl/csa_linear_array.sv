// csa_linear_array -- NOP:2 carry-save compressor tree built as a linear array
// of 3:2 carry-save adders (full-adder level description).
//
// The tree uses NOP-2 N-bit 3:2 adders (csa_3to2), each removing one word.
// Instead of arranging them as a Wallace-style tree, every adder takes the
// carry word of the adder before it on its carry input Ci, shifted left by
// one bit.  The first adder takes operand 0 on Ci instead.  Its two regular
// inputs A and B read, in order, the remaining operands 1 .. NOP-1 and then
// the partial sum words in the order they were produced.  The carry chain
// therefore runs unbroken from operand 0 to the final carry word, and on
// an FPGA it maps onto the fast carry logic.  The sum word of the last
// adder is the tree's sum output and its shifted carry word the tree's
// carry output.  For NOP = 9 this gives four adders on the operands, two on
// their sums and one final adder, as in the 9:2 example.
//
// Arithmetic is modulo 2^N: operands must already be sign or zero extended
// so that the sum fits in N bits.  sum_w + carry_w == sum(ops) mod 2^N.
//
// Purely combinational.  Counted in adders the depth is NOP-2.  On an FPGA
// the carry links are far faster than the regular inputs, and the delay
// counted in regular-input levels is about ceil(log2(NOP-1)).
//
// The list order, the carry chaining and the adder count follow the
// linear-array structure described for this design; the carry-word output
// being already aligned (shifted) is this implementation's choice.
module csa_linear_array
  import csa_pkg::*;
#(
  parameter int NOP = 9,   // number of operands (>= 3)
  parameter int N   = 16   // word width (>= 2)
) (
  input  logic [N-1:0] ops [NOP],  // input operands I0 .. I(NOP-1)
  output logic [N-1:0] sum_w,      // final sum word Sf
  output logic [N-1:0] carry_w     // final carry word Cf, aligned
);

  localparam int M = lin32_adders(NOP);  // number of 3:2 adders
  localparam int L = NOP - 1 + M;        // list: operands 1.., then sums

  if (NOP < 3) begin : g_bad_nop
    $error("csa_linear_array needs NOP >= 3");
  end
  if (N < 2) begin : g_bad_n
    $error("csa_linear_array needs N >= 2");
  end

  logic [N-1:0] lst [L];   // regular-input list
  logic [N-1:0] cw  [M];   // unshifted carry word of each adder

  for (genvar e = 0; e < NOP - 1; e++) begin : g_list_ops
    assign lst[e] = ops[e + 1];
  end

  for (genvar k = 0; k < M; k++) begin : g_adder
    localparam int SA = slot_src(NOP, 1, 2, k, 0);
    localparam int SB = slot_src(NOP, 1, 2, k, 1);
    if (SA < 0 || SB < 0) begin : g_bad_slot
      $error("linear array list ran dry");
    end
    logic [N-1:0] ci;
    if (k == 0) begin : g_first
      assign ci = ops[0];
    end else begin : g_chain
      assign ci = {cw[k-1][N-2:0], 1'b0};
    end
    csa_3to2 #(.N(N)) u_csa (
      .a (lst[SA]),
      .b (lst[SB]),
      .ci(ci),
      .s (lst[NOP - 1 + k]),
      .co(cw[k])
    );
  end

  assign sum_w   = lst[L - 1];
  assign carry_w = {cw[M-1][N-2:0], 1'b0};

endmodule
