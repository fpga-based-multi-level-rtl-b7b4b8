// csa_linear_array_cpa -- NOP:2 linear-array carry-save compressor tree
// written as an array of carry-propagate adders.
//
// Same tree, bit for bit, as csa_linear_array, described the way it is
// meant to be mapped on an FPGA.  In the linear array the full adder at bit j
// of adder k takes its carry from bit j-1 of adder k-1.  Following the
// carry links, the full adders therefore fall into diagonal chains
// d = j - k, and each chain is an ordinary ripple-carry adder.  Each chain is
// written as one '+' of two words, so synthesis puts it on the dedicated
// carry chain:
//   word A of chain d = bits (k+d) of the A inputs of adders k along d,
//   word B likewise, carry in = bit d of operand 0 (chains starting in the
//   first adder) or 0 (chains starting at bit 0 of a later adder).
// Sum bit i of chain d is bit (kmin+i+d) of the partial sum word of adder
// kmin+i.  The carry out of a chain that ends in the last adder is a bit of
// the final carry word.  The carry out of a chain that ends at bit N-1 is
// discarded (modulo 2^N).
// A chain reads partial-sum bits only from chains with a higher index d.
// The word-level dependencies between chains are therefore acyclic, even
// though all chains write bits of the same list of partial sum words.  A lint
// tool that tracks whole arrays may still report a combinational loop through
// 'lst'; there is none at bit level.
//
// The array of CPAs and the diagonal mapping follow the described
// translation of the linear array into carry-propagate adders; the chain
// indexing is this implementation's.
//
// Interface, arithmetic (modulo 2^N) and timing as csa_linear_array.
module csa_linear_array_cpa
  import csa_pkg::*;
#(
  parameter int NOP = 9,   // number of operands (>= 3)
  parameter int N   = 16   // word width (>= 2)
) (
  input  logic [N-1:0] ops [NOP],  // input operands I0 .. I(NOP-1)
  output logic [N-1:0] sum_w,      // final sum word Sf
  output logic [N-1:0] carry_w     // final carry word Cf, aligned
);

  localparam int M = lin32_adders(NOP);
  localparam int L = NOP - 1 + M;

  if (NOP < 3) begin : g_bad_nop
    $error("csa_linear_array_cpa needs NOP >= 3");
  end
  if (N < 2) begin : g_bad_n
    $error("csa_linear_array_cpa needs N >= 2");
  end

  // Nets: every bit of a partial sum word is driven by its own chain.
  wire [N-1:0] lst [L];
  wire [N-1:0] cf;

  for (genvar e = 0; e < NOP - 1; e++) begin : g_list_ops
    assign lst[e] = ops[e + 1];
  end

  assign cf[0] = 1'b0;

  // Chain gd covers diagonal d = gd - (M-1), from -(M-1) to N-1.
  for (genvar gd = 0; gd < M + N - 1; gd++) begin : g_chain
    localparam int D    = gd - (M - 1);
    localparam int KMIN = (D < 0) ? -D : 0;
    localparam int KMAX = (N - 1 - D < M - 1) ? N - 1 - D : M - 1;
    localparam int LEN  = KMAX - KMIN + 1;

    logic [LEN-1:0] wa, wb;
    logic           cin;
    logic [LEN:0]   res;

    for (genvar i = 0; i < LEN; i++) begin : g_bit
      localparam int K  = KMIN + i;
      localparam int SA = slot_src(NOP, 1, 2, K, 0);
      localparam int SB = slot_src(NOP, 1, 2, K, 1);
      assign wa[i] = lst[SA][K + D];
      assign wb[i] = lst[SB][K + D];
      assign lst[NOP - 1 + K][K + D] = res[i];
    end

    if (KMIN == 0) begin : g_cin_op
      assign cin = ops[0][D];
    end else begin : g_cin_zero
      assign cin = 1'b0;
    end

    assign res = {1'b0, wa} + {1'b0, wb} + {{LEN{1'b0}}, cin};

    if (KMAX == M - 1 && M + D <= N - 1) begin : g_cout
      assign cf[M + D] = res[LEN];
    end
  end

  assign sum_w   = lst[L - 1];
  assign carry_w = cf;

endmodule
