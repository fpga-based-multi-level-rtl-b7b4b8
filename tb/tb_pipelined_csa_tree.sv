// tb_pipelined_csa_tree -- self-checking testbench of the pipelined tree.
//
// Four configurations run side by side on one clock, the default
// (18 operands, 16 bits, two stages, 6:2 blocks) first.  Operand sets enter
// with random gaps and in back-to-back bursts.  A scoreboard stamps every
// accepted set with its clock edge and checks at the output that
//   - out_valid appears exactly LAT clock edges after the set was sampled,
//     with LAT the number of stages expected for the configuration,
//   - sum and carry words equal, bit for bit, a model that cuts the words
//     into the same groups (block size 2*ceil((NOP/2)^(1/S)), written out
//     per configuration below) and reduces them with linear arrays,
//   - sum + carry equals the operand sum modulo 2^N.
// A reset in mid-run must drop everything in flight.
module tb_pipelined_csa_tree;
  import tb_ref_pkg::*;

  localparam int NCFG = 4;
  localparam int NOPS [NCFG] = '{18, 5, 64, 128};
  localparam int NS   [NCFG] = '{16, 8, 16, 64};
  localparam int STG  [NCFG] = '{2, 2, 3, 2};
  localparam int XS   [NCFG] = '{6, 4, 8, 16};  // expected block sizes
  localparam int LATS [NCFG] = '{2, 2, 3, 2};   // expected latencies
  localparam int CYCLES = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cyc = 0;
  int   checks = 0, failures = 0, done = 0;
  int   bubbles = 0, bursts = 0, flushed = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NOP = NOPS[g];
    localparam int NW  = NS[g];

    logic          in_valid = 1'b0;
    logic [NW-1:0] ops [NOP];
    logic          out_valid;
    logic [NW-1:0] sw, cw;

    typedef struct {
      int    stamp;
      word_t es, ec, sum;
    } exp_t;
    exp_t sb [$];

    pipelined_csa_tree #(.NOP(NOP), .N(NW), .STAGES(STG[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .ops(ops),
      .out_valid(out_valid), .sum_w(sw), .carry_w(cw)
    );

    // Output side: checked at the falling edge.
    always @(negedge clk) begin
      if (rst_n) begin
        if (out_valid) begin
          checks++;
          if (sb.size() == 0) begin
            failures++;
            $display("FAIL cfg %0d: unexpected out_valid", g);
          end else begin
            exp_t e;
            e = sb.pop_front();
            if (cyc - e.stamp + 1 != LATS[g]) begin
              failures++;
              $display("FAIL cfg %0d: latency %0d, expected %0d", g,
                       cyc - e.stamp + 1, LATS[g]);
            end
            checks++;
            if (word_t'(sw) != e.es || word_t'(cw) != e.ec) begin
              failures++;
              $display("FAIL cfg %0d: words %h %h, expected %h %h", g, sw, cw,
                       e.es, e.ec);
            end
            checks++;
            if (((word_t'(sw) + word_t'(cw)) & wmask(NW)) != e.sum) begin
              failures++;
              $display("FAIL cfg %0d: sum mismatch", g);
            end
          end
        end else if (sb.size() > 0 && cyc - sb[0].stamp + 1 > LATS[g]) begin
          failures++;
          $display("FAIL cfg %0d: result overdue", g);
          void'(sb.pop_front());
        end
      end
    end

    // Input side: driven at the falling edge, sampled at the next rising one.
    initial begin
      word_q_t q;
      word_t   w, es, ec;
      int      st;
      bit      prev_valid;
      prev_valid = 1'b0;
      foreach (ops[i]) ops[i] = '0;
      @(posedge rst_n);
      for (int t = 0; t < CYCLES; t++) begin
        @(negedge clk);
        if (!rst_n) begin
          // the reset drops everything in flight and what is driven now
          if (sb.size() > 0) flushed++;
          sb.delete();
          in_valid = 1'b0;
          prev_valid = 1'b0;
          continue;
        end
        in_valid = ($urandom_range(0, 3) != 0);
        if (in_valid) begin
          if (prev_valid) bursts++;
          q = {};
          for (int i = 0; i < NOP; i++) begin
            w = rand_word(NW);
            ops[i] = w[NW-1:0];
            q.push_back(w);
          end
          pipe_ref(q, NW, XS[g], es, ec, st);
          if (t == 0) begin
            checks++;
            if (st != LATS[g]) begin
              failures++;
              $display("FAIL cfg %0d: model needs %0d stages", g, st);
            end
          end
          sb.push_back('{stamp: cyc + 1, es: es, ec: ec, sum: ref_sum(q, NW)});
        end else begin
          if (prev_valid) bubbles++;
        end
        prev_valid = in_valid;
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (LATS[g] + 2) @(negedge clk);
      checks++;
      if (sb.size() != 0) begin
        failures++;
        $display("FAIL cfg %0d: %0d results never came out", g, sb.size());
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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // mid-run reset, changed just after a rising edge so that all drivers
    // see it stable at the falling edge
    repeat (CYCLES / 2) @(posedge clk);
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == NCFG);
    checks += 3;
    if (bubbles == 0) begin failures++; $display("FAIL no bubble seen"); end
    if (bursts == 0) begin failures++; $display("FAIL no burst seen"); end
    if (flushed == 0) begin failures++; $display("FAIL reset flushed nothing"); end
    $display("bubbles=%0d bursts=%0d flushes=%0d", bubbles, bursts, flushed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
