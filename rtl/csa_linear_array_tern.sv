// csa_linear_array_tern -- NOP:2 ternary linear-array compressor tree
// written as an array of ternary adders.
//
// Same tree, bit for bit, as csa_linear_array_53, described for synthesis
// tools that map a three-input '+' onto an FPGA ternary adder.  In the 5:3
// linear array both carries of bit j of array k (cA and cB) go to bit j+1
// of array k+1.  The compressor cells therefore fall into diagonal chains
// d = j - k, and each chain is exactly a ternary adder, with cA and cB as
// its two internal carries.  Each chain is written as one sum of its three
// words plus two carry-in bits:
//   words A, B, C of chain d = bits (k+d) of the regular inputs of
//   arrays k along d (zero where the array reads zero);
//   carry-ins = bit d of operands 0 and 1 for chains that start in the
//   first array, zero otherwise.
// Sum bit i of chain d is bit (kmin+i+d) of the partial sum word of array
// kmin+i.  The bits of the chain result above its length equal cA + cB of
// its last cell.  For a chain ending in the last array cA is zero, so the
// bit is the final carry word bit.  Chains ending at bit N-1 drop their carry
// (modulo 2^N).  As in csa_linear_array_cpa, chains only read sum bits of
// chains with a higher d, so the apparent loop through 'lst' is not a loop
// at bit level.
//
// Interface, arithmetic and timing as csa_linear_array_53.  The mapping
// onto ternary adders follows the described use of ternary adders as the
// building element; the chain indexing is this implementation's.
module csa_linear_array_tern
  import csa_pkg::*;
#(
  parameter int NOP = 11,  // number of operands (>= 3)
  parameter int N   = 16   // word width (>= 2)
) (
  input  logic [N-1:0] ops [NOP],  // input operands I0 .. I(NOP-1)
  output logic [N-1:0] sum_w,      // final sum word Sf
  output logic [N-1:0] carry_w     // final carry word Cf, aligned
);

  localparam int M = lin53_adders(NOP);
  localparam int L = NOP - 2 + M;

  if (NOP < 3) begin : g_bad_nop
    $error("csa_linear_array_tern needs NOP >= 3");
  end
  if (N < 2) begin : g_bad_n
    $error("csa_linear_array_tern needs N >= 2");
  end
  if (slots_used(NOP, 2, 3, M - 1) > 1) begin : g_bad_last
    $error("last ternary adder cell would produce a non-zero cA");
  end

  wire [N-1:0] lst [L];
  wire [N-1:0] cf;

  for (genvar e = 0; e < NOP - 2; e++) begin : g_list_ops
    assign lst[e] = ops[e + 2];
  end

  assign cf[0] = 1'b0;

  for (genvar gd = 0; gd < M + N - 1; gd++) begin : g_chain
    localparam int D    = gd - (M - 1);
    localparam int KMIN = (D < 0) ? -D : 0;
    localparam int KMAX = (N - 1 - D < M - 1) ? N - 1 - D : M - 1;
    localparam int LEN  = KMAX - KMIN + 1;

    logic [LEN-1:0] w [3];
    logic           cina, cinb;
    logic [LEN+1:0] res;

    for (genvar i = 0; i < LEN; i++) begin : g_bit
      localparam int K = KMIN + i;
      for (genvar sl = 0; sl < 3; sl++) begin : g_slot
        localparam int SRC = slot_src(NOP, 2, 3, K, sl);
        if (SRC >= 0) begin : g_word
          assign w[sl][i] = lst[SRC][K + D];
        end else begin : g_zero
          assign w[sl][i] = 1'b0;
        end
      end
      assign lst[NOP - 2 + K][K + D] = res[i];
    end

    if (KMIN == 0) begin : g_cin_op
      assign cina = ops[0][D];
      assign cinb = ops[1][D];
    end else begin : g_cin_zero
      assign cina = 1'b0;
      assign cinb = 1'b0;
    end

    assign res = {2'b0, w[0]} + {2'b0, w[1]} + {2'b0, w[2]}
               + {{(LEN+1){1'b0}}, cina} + {{(LEN+1){1'b0}}, cinb};

    if (KMAX == M - 1 && M + D <= N - 1) begin : g_cout
      assign cf[M + D] = res[LEN];
    end
  end

  assign sum_w   = lst[L - 1];
  assign carry_w = cf;

endmodule
