// tb_csa_linear_array_cpa -- self-checking testbench of csa_linear_array_cpa.
//
// Drives the linear array written as an array of carry-propagate adders, including sizes where the array has more adders than bits.
// Several operand counts and widths are instantiated side by side, the
// default configuration first.  For every random operand set the sum and
// carry words must equal, bit for bit, those of a word-level model of the
// same linear array (tb_ref_pkg), and their sum must equal the plain sum of
// the operands modulo 2^N.  The operand generator often uses all-ones and
// zero words so that long carry chains and wrap-around modulo 2^N occur.
module tb_csa_linear_array_cpa;
  import tb_ref_pkg::*;

  localparam int NCFG = 6;
  localparam int NOPS [NCFG] = '{9, 3, 4, 8, 17, 33};
  localparam int NS   [NCFG] = '{16, 8, 8, 16, 32, 64};
  localparam int TRIALS = 300;

  int checks = 0, failures = 0, done = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NOP = NOPS[g];
    localparam int NW  = NS[g];

    logic [NW-1:0] ops [NOP];
    logic [NW-1:0] sw, cw;

    csa_linear_array_cpa #(.NOP(NOP), .N(NW)) dut (.ops(ops), .sum_w(sw), .carry_w(cw));

    initial begin
      word_q_t q;
      word_t   w, es, ec;
      int    aux;
      for (int t = 0; t < TRIALS; t++) begin
        q = {};
        for (int i = 0; i < NOP; i++) begin
          w = rand_word(NW);
          ops[i] = w[NW-1:0];
          q.push_back(w);
        end
        #1;
        lin32_ref(q, NW, es, ec, aux);
          if (t == 0) begin
            checks++;
            if (aux != NOP - 2) begin
              failures++;
              $display("FAIL NOP=%0d: model used %0d adders", NOP, aux);
            end
          end
        checks++;
        if (word_t'(sw) != es || word_t'(cw) != ec) begin
          failures++;
          $display("FAIL NOP=%0d N=%0d: sum %h carry %h, expected %h %h",
                   NOP, NW, sw, cw, es, ec);
        end
        checks++;
        if (((word_t'(sw) + word_t'(cw)) & wmask(NW)) != ref_sum(q, NW)) begin
          failures++;
          $display("FAIL NOP=%0d N=%0d: sum+carry != operand sum", NOP, NW);
        end
      end
      done++;
    end
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
