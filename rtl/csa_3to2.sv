// csa_3to2 -- N-bit 3:2 carry-save adder (a row of N full adders).
//
// Reduces three N-bit words to a sum word and a carry word with no carry
// propagation between bit positions: bit j of s and co is the full-adder
// sum and majority of a[j], b[j] and ci[j].  The carry word co is returned
// unshifted, so co[j] has weight 2^(j+1); the user shifts it left by one
// before adding it to anything (a + b + ci == s + 2*co, exactly, when the
// top carry co[N-1] is kept).  Inputs a and b are the two "regular" inputs
// and ci the input that an FPGA carry chain would drive, matching the
// A, B and Ci pins of the adders in the linear-array trees.
//
// Purely combinational: one full-adder delay from any input to any output.
module csa_3to2 #(
  parameter int N = 16   // word width
) (
  input  logic [N-1:0] a,   // regular input A
  input  logic [N-1:0] b,   // regular input B
  input  logic [N-1:0] ci,  // carry-chain input Ci
  output logic [N-1:0] s,   // sum word (weight 2^j at bit j)
  output logic [N-1:0] co   // carry word (weight 2^(j+1) at bit j)
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
