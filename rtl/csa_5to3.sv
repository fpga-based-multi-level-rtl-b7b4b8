// csa_5to3 -- N-bit 5:3 compressor array (a ternary adder with its carries cut).
//
// An FPGA ternary adder computes A+B+C in each bit with two carry signals:
// cA, from a first full-adder level over A, B and C (it does not depend on
// any earlier carry), and cB, from a second full-adder level that adds the
// first-level sum to the incoming cA and cB and forms the carry chain.  With
// both carries of bit j taken out of the adder instead of into bit j+1, the
// row becomes a 5:3 compressor array: five words in (a, b, c, cai, cbi),
// one sum word and two carry words out, with
//   a + b + c + cai + cbi == s + 2*cao + 2*cbo   (all bits kept).
// Per bit:  {cao, t} = a + b + c;  {cbo, s} = t + cai + cbi.
// cao and cbo are returned unshifted (weight 2^(j+1) at bit j).
//
// Purely combinational: two full-adder delays from a, b, c; one from
// cai and cbi.
module csa_5to3 #(
  parameter int N = 16   // word width
) (
  input  logic [N-1:0] a,    // regular input A
  input  logic [N-1:0] b,    // regular input B
  input  logic [N-1:0] c,    // regular input C
  input  logic [N-1:0] cai,  // carry input cA
  input  logic [N-1:0] cbi,  // carry input cB (carry-chain input)
  output logic [N-1:0] s,    // sum word
  output logic [N-1:0] cao,  // carry output cA of the first level
  output logic [N-1:0] cbo   // carry output cB of the second level
);

  logic [N-1:0] t;  // first-level sum

  always_comb begin
    t   = a ^ b ^ c;
    cao = (a & b) | (a & c) | (b & c);
    s   = t ^ cai ^ cbi;
    cbo = (t & cai) | (t & cbi) | (cai & cbi);
  end

endmodule
