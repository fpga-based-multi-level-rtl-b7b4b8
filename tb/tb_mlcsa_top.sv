// tb_mlcsa_top -- end-to-end testbench of mlcsa_top.
//
// Two copies of the top run on the same stimulus: one with every parameter
// at its default (adder-level descriptions) and one with STRUCTURAL = 1
// (full-adder-level descriptions).  Every cycle a new random operand set is
// applied to the 9-operand binary tree and the 11-operand ternary tree, and
// with random gaps to the 18-operand pipelined tree.  Checked:
//   - binary and ternary results equal the operand sums modulo 2^16, and
//     their carry-save words equal the word-level models bit for bit;
//   - both descriptions give identical carry-save words;
//   - pipelined results come out exactly two clock edges after the
//     operands were sampled and equal the operand sum;
//   - a mid-run reset drops the sets in flight.
// Mechanisms that must each occur at least once (else a failure is
// counted): wrap-around modulo 2^N in each tree, a non-zero carry word out
// of each tree, carry propagation in the final adders, back-to-back
// pipelined sets, a bubble in the pipeline and a reset with data in flight.
module tb_mlcsa_top;
  import tb_ref_pkg::*;

  localparam int N = 16, NB = 9, NT = 11, NP = 18, LAT = 2;
  localparam int CYCLES = 600;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] bin_ops [NB];
  logic [N-1:0] ter_ops [NT];
  logic [N-1:0] pipe_ops [NP];
  logic         pipe_in_valid = 1'b0;

  logic [N-1:0] bs [2], bc [2], br [2], ts [2], tc [2], tr [2];
  logic [N-1:0] ps [2], pc [2], pr [2];
  logic         pv [2];

  int cyc = 0, checks = 0, failures = 0;
  int n_wrap_bin = 0, n_wrap_ter = 0, n_wrap_pipe = 0;
  int n_carry_bin = 0, n_carry_ter = 0, n_carry_pipe = 0;
  int n_cpa_prop = 0, n_burst = 0, n_bubble = 0, n_flush = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mlcsa_top dut_default (
    .clk(clk), .rst_n(rst_n),
    .bin_ops(bin_ops), .bin_sum_w(bs[0]), .bin_carry_w(bc[0]), .bin_result(br[0]),
    .ter_ops(ter_ops), .ter_sum_w(ts[0]), .ter_carry_w(tc[0]), .ter_result(tr[0]),
    .pipe_in_valid(pipe_in_valid), .pipe_ops(pipe_ops), .pipe_out_valid(pv[0]),
    .pipe_sum_w(ps[0]), .pipe_carry_w(pc[0]), .pipe_result(pr[0])
  );

  mlcsa_top #(.STRUCTURAL(1'b1)) dut_structural (
    .clk(clk), .rst_n(rst_n),
    .bin_ops(bin_ops), .bin_sum_w(bs[1]), .bin_carry_w(bc[1]), .bin_result(br[1]),
    .ter_ops(ter_ops), .ter_sum_w(ts[1]), .ter_carry_w(tc[1]), .ter_result(tr[1]),
    .pipe_in_valid(pipe_in_valid), .pipe_ops(pipe_ops), .pipe_out_valid(pv[1]),
    .pipe_sum_w(ps[1]), .pipe_carry_w(pc[1]), .pipe_result(pr[1])
  );

  typedef struct {
    int    stamp;
    word_t sum;
  } exp_t;
  exp_t sb [$];

  function automatic word_t full_sum(input word_q_t q);
    word_t acc;
    acc = '0;
    foreach (q[i]) acc += q[i];
    return acc;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // Output side of the pipelined trees, at the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (pv[0] !== pv[1]) fail("pipelined valid differs between copies");
      if (pv[0]) begin
        exp_t e;
        checks++;
        if (sb.size() == 0) fail("unexpected pipelined result");
        else begin
          e = sb.pop_front();
          if (cyc - e.stamp + 1 != LAT) fail("pipelined latency wrong");
          for (int d = 0; d < 2; d++)
            if (word_t'(pr[d]) != (e.sum & wmask(N))) fail("pipelined result wrong");
          if (pc[0] != '0) n_carry_pipe++;
        end
      end else if (sb.size() > 0 && cyc - sb[0].stamp + 1 > LAT) begin
        fail("pipelined result overdue");
        void'(sb.pop_front());
      end
    end
  end

  initial begin : watchdog
    #((CYCLES + 50) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_q_t qb, qt, qp;
    word_t   w, es, ec, cal, fs;
    int      aux;
    bit      prev_valid;

    foreach (bin_ops[i])  bin_ops[i]  = '0;
    foreach (ter_ops[i])  ter_ops[i]  = '0;
    foreach (pipe_ops[i]) pipe_ops[i] = '0;
    prev_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      // one reset in mid-run: changed at the falling edge, then held for a
      // full cycle, so the set sampled while it is low is dropped as well
      if (t == CYCLES / 2) begin
        rst_n = 1'b0;
        if (sb.size() > 0) n_flush++;
        sb.delete();
        pipe_in_valid = 1'b0;
        prev_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
      end

      // combinational trees
      qb = {};
      qt = {};
      for (int i = 0; i < NB; i++) begin
        w = rand_word(N);
        bin_ops[i] = w[N-1:0];
        qb.push_back(w);
      end
      for (int i = 0; i < NT; i++) begin
        w = rand_word(N);
        ter_ops[i] = w[N-1:0];
        qt.push_back(w);
      end

      // pipelined tree
      pipe_in_valid = ($urandom_range(0, 3) != 0);
      if (pipe_in_valid) begin
        if (prev_valid) n_burst++;
        qp = {};
        for (int i = 0; i < NP; i++) begin
          w = rand_word(N);
          pipe_ops[i] = w[N-1:0];
          qp.push_back(w);
        end
        fs = full_sum(qp);
        if (fs > wmask(N)) n_wrap_pipe++;
        sb.push_back('{stamp: cyc + 1, sum: fs});
      end else if (prev_valid) n_bubble++;
      prev_valid = pipe_in_valid;

      #1;
      lin32_ref(qb, N, es, ec, aux);
      for (int d = 0; d < 2; d++) begin
        checks += 2;
        if (word_t'(bs[d]) != es || word_t'(bc[d]) != ec) fail("binary words wrong");
        if (word_t'(br[d]) != ref_sum(qb, N)) fail("binary result wrong");
      end
      lin53_ref(qt, N, es, ec, cal, aux);
      for (int d = 0; d < 2; d++) begin
        checks += 2;
        if (word_t'(ts[d]) != es || word_t'(tc[d]) != ec) fail("ternary words wrong");
        if (word_t'(tr[d]) != ref_sum(qt, N)) fail("ternary result wrong");
      end
      if (full_sum(qb) > wmask(N)) n_wrap_bin++;
      if (full_sum(qt) > wmask(N)) n_wrap_ter++;
      if (bc[0] != '0) n_carry_bin++;
      if (tc[0] != '0) n_carry_ter++;
      if (br[0] != (bs[0] ^ bc[0])) n_cpa_prop++;
    end

    @(negedge clk);
    pipe_in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) fail("pipelined results missing");

    $display("wrap bin/ter/pipe=%0d/%0d/%0d carry bin/ter/pipe=%0d/%0d/%0d",
             n_wrap_bin, n_wrap_ter, n_wrap_pipe,
             n_carry_bin, n_carry_ter, n_carry_pipe);
    $display("cpa propagation=%0d bursts=%0d bubbles=%0d reset flushes=%0d",
             n_cpa_prop, n_burst, n_bubble, n_flush);
    checks += 10;
    if (n_wrap_bin == 0)   fail("no wrap-around in binary tree");
    if (n_wrap_ter == 0)   fail("no wrap-around in ternary tree");
    if (n_wrap_pipe == 0)  fail("no wrap-around in pipelined tree");
    if (n_carry_bin == 0)  fail("binary carry word always zero");
    if (n_carry_ter == 0)  fail("ternary carry word always zero");
    if (n_carry_pipe == 0) fail("pipelined carry word always zero");
    if (n_cpa_prop == 0)   fail("final adder never propagated a carry");
    if (n_burst == 0)      fail("no back-to-back pipelined sets");
    if (n_bubble == 0)     fail("no pipeline bubble");
    if (n_flush == 0)      fail("reset flushed nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
