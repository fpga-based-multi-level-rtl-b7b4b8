// cpa -- final carry-propagate adder of the compressor trees.
//
// Converts a carry-save number, a sum word plus an already aligned carry
// word, into an ordinary N-bit binary number.  Written as a plain '+' so
// that FPGA synthesis maps it onto the dedicated carry chain.  The result is
// taken modulo 2^N: the operands of the trees are assumed to be sign or zero
// extended far enough that the true sum fits in N bits; the bit shifted out
// is still returned as cout for a user that wants to detect unsigned
// overflow.
//
// Purely combinational.
module cpa #(
  parameter int N = 16   // word width
) (
  input  logic [N-1:0] sum_w,    // sum word of the carry-save number
  input  logic [N-1:0] carry_w,  // carry word, already at its bit weights
  output logic [N-1:0] result,   // (sum_w + carry_w) mod 2^N
  output logic         cout      // carry out of bit N-1
);

  always_comb begin
    {cout, result} = {1'b0, sum_w} + {1'b0, carry_w};
  end

endmodule
