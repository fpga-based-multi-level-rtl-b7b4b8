// tb_workload_sweep -- the compressor trees at the sizes they are evaluated at.
//
// The trees are evaluated for 4 to 128 operands at word widths of 16, 32, 64
// and 128 bits.  This testbench instantiates every tree description at
// points that span that range: the smallest and largest operand counts,
// counts on both sides of a power of two, and every width.
//   form 0: csa_linear_array_cpa   (binary linear array as CPAs)
//   form 1: csa_linear_array_tern  (5:3 linear array as ternary adders)
//   form 2: csa_linear_array       (3:2 full-adder rows)
//   form 3: csa_linear_array_53    (5:3 compressor rows)
// The two adder-level forms describe every bit of every carry chain
// separately, and their simulation models grow quickly with the number of
// rows.  They are run from 4 to 33 operands here, at all of 16, 32 and 64
// bits.  The word-level forms, which are bit-identical to them, cover 4 to
// 128 operands at 16 to 64 bits and are run at 128 bits with 17 and 9
// operands.  Every instance gets random operand sets.  Its sum and carry
// words must equal the word-level model bit for bit, and their sum must equal
// the operand sum modulo 2^N.
module tb_workload_sweep;
  import tb_ref_pkg::*;

  localparam int NINST = 16;
  localparam int FORM [NINST] = '{0,  0,  0,  1,  1,  1,  2,   2,   2,   2,   2,  3,  3,   3,   3,   3};
  localparam int NOPS [NINST] = '{4, 17, 33,  5, 17, 33,  4,  65, 128, 128,  17,  5, 64, 128, 128,   9};
  localparam int WS   [NINST] = '{16, 32, 64, 16, 64, 32, 16, 32,  16,  64, 128, 16, 32,  16,  64, 128};
  localparam int TRIALS = 20;

  int checks = 0, failures = 0, done = 0;

  for (genvar g = 0; g < NINST; g++) begin : g_inst
    localparam int NW  = WS[g];
    localparam int NOP = NOPS[g];
    localparam int F   = FORM[g];

    logic [NW-1:0] ops [NOP];
    logic [NW-1:0] sw, cw;

    if (F == 0) begin : g_cpa
      csa_linear_array_cpa #(.NOP(NOP), .N(NW)) dut (
        .ops(ops), .sum_w(sw), .carry_w(cw));
    end else if (F == 1) begin : g_tern
      csa_linear_array_tern #(.NOP(NOP), .N(NW)) dut (
        .ops(ops), .sum_w(sw), .carry_w(cw));
    end else if (F == 2) begin : g_fa32
      csa_linear_array #(.NOP(NOP), .N(NW)) dut (
        .ops(ops), .sum_w(sw), .carry_w(cw));
    end else begin : g_fa53
      csa_linear_array_53 #(.NOP(NOP), .N(NW)) dut (
        .ops(ops), .sum_w(sw), .carry_w(cw));
    end

    initial begin
      word_q_t q;
      word_t   w, es, ec, cal;
      int      aux;
      for (int t = 0; t < TRIALS; t++) begin
        q = {};
        for (int i = 0; i < NOP; i++) begin
          w = rand_word(NW);
          ops[i] = w[NW-1:0];
          q.push_back(w);
        end
        #1;
        if (F == 0 || F == 2) lin32_ref(q, NW, es, ec, aux);
        else lin53_ref(q, NW, es, ec, cal, aux);
        checks += 2;
        if (word_t'(sw) != es || word_t'(cw) != ec) begin
          failures++;
          $display("FAIL form %0d NOP=%0d N=%0d: words differ from model",
                   F, NOP, NW);
        end
        if (((word_t'(sw) + word_t'(cw)) & wmask(NW)) != ref_sum(q, NW)) begin
          failures++;
          $display("FAIL form %0d NOP=%0d N=%0d: sum wrong", F, NOP, NW);
        end
      end
      done++;
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == NINST);
    $display("%0d tree instances checked", NINST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
