// pipelined_csa_tree -- pipelined NOP:2 carry-save compressor tree built from
// small linear-array blocks.
//
// A linear array is one long carry chain, so registers cannot simply be cut
// into it.  Instead the tree is built in stages.  Each stage splits its words
// into groups of at most X and reduces every group to a sum and a carry word
// with an X:2 linear-array tree (csa_linear_array_cpa).  The outputs of all
// groups are registered.  A group of one or two words is passed through.
// The stage output feeds the next stage, until two words remain.  The block
// size follows the sizing rule for these trees,
//   X = 2 * ceil((NOP/2)^(1/STAGES)),
// so NOP = 18 and STAGES = 2 give X = 6: three 6:2 blocks reduce 18 words to
// 6, and one more 6:2 block reduces them to the final 2.
//
// Timing: every stage ends in a register, so sum_w/carry_w appear
// PIPE_STAGES clock cycles after ops is sampled with in_valid high.
// in_valid travels along with the data (out_valid), and a new operand set
// can enter every cycle.  Synchronous active-low reset clears the valid bits
// and the data registers.  Arithmetic is modulo 2^N, as in the linear arrays.
//
// The staging with linear-array blocks and the block-size rule follow the
// pipelining scheme described for this design.  Registering at the block
// outputs (rather than inputs), the valid bit and the reset are this
// implementation's choices.
module pipelined_csa_tree
  import csa_pkg::*;
#(
  parameter int NOP    = 18,  // number of operands (>= 3)
  parameter int N      = 16,  // word width (>= 2)
  parameter int STAGES = 2    // requested pipeline depth
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         in_valid,   // ops holds an operand set
  input  logic [N-1:0] ops [NOP],  // input operands
  output logic         out_valid,  // sum_w/carry_w hold a result
  output logic [N-1:0] sum_w,      // final sum word
  output logic [N-1:0] carry_w     // final carry word, aligned
);

  localparam int X           = pipe_block_size(NOP, STAGES);
  localparam int PIPE_STAGES = pipe_stages(NOP, X);

  if (NOP < 3) begin : g_bad_nop
    $error("pipelined_csa_tree needs NOP >= 3");
  end

  // w[s]: words entering stage s (w[0] is the input), padded with zeros.
  logic [N-1:0] w   [PIPE_STAGES+1][NOP];
  logic [N-1:0] cmb [PIPE_STAGES][NOP];
  logic         vld [PIPE_STAGES+1];

  for (genvar i = 0; i < NOP; i++) begin : g_in
    assign w[0][i] = ops[i];
  end
  assign vld[0] = in_valid;

  for (genvar s = 0; s < PIPE_STAGES; s++) begin : g_stage
    localparam int WIN  = pipe_words(NOP, X, s);
    localparam int WOUT = pipe_words(NOP, X, s + 1);
    localparam int G    = (WIN + X - 1) / X;

    for (genvar g = 0; g < G; g++) begin : g_group
      localparam int BASE = g * X;
      localparam int SZ   = (WIN - BASE < X) ? WIN - BASE : X;
      if (SZ >= 3) begin : g_tree
        logic [N-1:0] gops [SZ];
        for (genvar i = 0; i < SZ; i++) begin : g_op
          assign gops[i] = w[s][BASE + i];
        end
        csa_linear_array_cpa #(.NOP(SZ), .N(N)) u_block (
          .ops    (gops),
          .sum_w  (cmb[s][2*g]),
          .carry_w(cmb[s][2*g + 1])
        );
      end else if (SZ == 2) begin : g_pass2
        assign cmb[s][2*g]     = w[s][BASE];
        assign cmb[s][2*g + 1] = w[s][BASE + 1];
      end else begin : g_pass1
        assign cmb[s][2*g]     = w[s][BASE];
        assign cmb[s][2*g + 1] = '0;
      end
    end
    for (genvar i = 2 * G; i < NOP; i++) begin : g_unused
      assign cmb[s][i] = '0;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld[s+1] <= 1'b0;
        for (int i = 0; i < NOP; i++) w[s+1][i] <= '0;
      end else begin
        vld[s+1] <= vld[s];
        for (int i = 0; i < NOP; i++)
          w[s+1][i] <= (i < WOUT) ? cmb[s][i] : '0;
      end
    end
  end

  assign out_valid = vld[PIPE_STAGES];
  assign sum_w     = w[PIPE_STAGES][0];
  assign carry_w   = w[PIPE_STAGES][1];

endmodule
