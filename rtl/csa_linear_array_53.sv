// csa_linear_array_53 -- NOP:2 carry-save compressor tree built as a linear
// array of 5:3 compressor arrays, for FPGAs with ternary adders.
//
// Uses M = ceil((NOP-1)/2) N-bit 5:3 compressor arrays (csa_5to3).  The
// first array takes operands 0 and 1 on its carry inputs cA and cB and
// operands 2, 3 and 4 on its regular inputs A, B and C.  Every later array
// takes the two carry words of the array before it, shifted left by one
// bit, on cA and cB.  Its regular inputs read, in order, the remaining
// operands and then the partial sum words in the order they were produced.
// When that list is momentarily empty a regular input reads zero.  Each
// array after the first removes two words.  The last array reads a single
// word and two zeros, so its cA word is zero.  Its sum word is the tree's
// sum output and its shifted cB word the tree's carry output.  NOP = 11
// gives five arrays with two zero inputs, as in the 11:2 example.
// Both carry chains run unbroken from operands 0/1 to the end of the tree.
//
// Arithmetic is modulo 2^N (operands pre-extended); sum_w + carry_w ==
// sum(ops) mod 2^N.  Purely combinational.
//
// The array count, the use of operands 0 and 1 as carry inputs and the zero
// inputs follow the ternary linear array described for this design; the
// exact position of the zero inputs (wherever the list runs dry) is this
// implementation's choice.
module csa_linear_array_53
  import csa_pkg::*;
#(
  parameter int NOP = 11,  // number of operands (>= 3)
  parameter int N   = 16   // word width (>= 2)
) (
  input  logic [N-1:0] ops [NOP],  // input operands I0 .. I(NOP-1)
  output logic [N-1:0] sum_w,      // final sum word Sf
  output logic [N-1:0] carry_w     // final carry word Cf, aligned
);

  localparam int M = lin53_adders(NOP);  // number of 5:3 arrays
  localparam int L = NOP - 2 + M;        // list: operands 2.., then sums

  if (NOP < 3) begin : g_bad_nop
    $error("csa_linear_array_53 needs NOP >= 3");
  end
  if (N < 2) begin : g_bad_n
    $error("csa_linear_array_53 needs N >= 2");
  end
  if (slots_used(NOP, 2, 3, M - 1) > 1) begin : g_bad_last
    $error("last 5:3 array would produce a non-zero cA word");
  end

  logic [N-1:0] lst [L];
  logic [N-1:0] ca  [M];   // unshifted cA words
  logic [N-1:0] cb  [M];   // unshifted cB words

  for (genvar e = 0; e < NOP - 2; e++) begin : g_list_ops
    assign lst[e] = ops[e + 2];
  end

  for (genvar k = 0; k < M; k++) begin : g_array
    logic [N-1:0] rin [3];
    logic [N-1:0] cai, cbi;
    for (genvar sl = 0; sl < 3; sl++) begin : g_slot
      localparam int SRC = slot_src(NOP, 2, 3, k, sl);
      if (SRC >= 0) begin : g_word
        assign rin[sl] = lst[SRC];
      end else begin : g_zero
        assign rin[sl] = '0;
      end
    end
    if (k == 0) begin : g_first
      assign cai = ops[0];
      assign cbi = ops[1];
    end else begin : g_chain
      assign cai = {ca[k-1][N-2:0], 1'b0};
      assign cbi = {cb[k-1][N-2:0], 1'b0};
    end
    csa_5to3 #(.N(N)) u_c53 (
      .a  (rin[0]),
      .b  (rin[1]),
      .c  (rin[2]),
      .cai(cai),
      .cbi(cbi),
      .s  (lst[NOP - 2 + k]),
      .cao(ca[k]),
      .cbo(cb[k])
    );
  end

  assign sum_w   = lst[L - 1];
  assign carry_w = {cb[M-1][N-2:0], 1'b0};

  // The last array adds one word to two zeros: its cA word must be zero.
  always_comb begin
    assert (ca[M-1] == '0)
      else $error("csa_linear_array_53: last cA word not zero");
  end

endmodule
