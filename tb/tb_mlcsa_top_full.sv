// tb_mlcsa_top_full -- one complete operation of mlcsa_top at its defaults.
//
// The top is instantiated with no parameter overrides (9-, 11- and
// 18-operand trees of 16-bit words).  One operand set per tree is applied:
// a few fixed sets (all ones, for the largest wrap-around, and an ascending
// sequence) and then random ones.  The combinational results are checked
// at once; the pipelined result must appear exactly two clock edges after
// its operands were sampled.
module tb_mlcsa_top_full;
  localparam int N = 16, NB = 9, NT = 11, NP = 18, LAT = 2;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0] bin_ops [NB];
  logic [N-1:0] ter_ops [NT];
  logic [N-1:0] pipe_ops [NP];
  logic [N-1:0] bs, bc, br, ts, tc, tr, ps, pc, pr;
  logic         pv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlcsa_top dut (
    .clk(clk), .rst_n(rst_n),
    .bin_ops(bin_ops), .bin_sum_w(bs), .bin_carry_w(bc), .bin_result(br),
    .ter_ops(ter_ops), .ter_sum_w(ts), .ter_carry_w(tc), .ter_result(tr),
    .pipe_in_valid(in_valid), .pipe_ops(pipe_ops), .pipe_out_valid(pv),
    .pipe_sum_w(ps), .pipe_carry_w(pc), .pipe_result(pr)
  );

  initial begin : watchdog
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_operation(input int mode);
    logic [N-1:0] eb, et, ep;
    int waited;
    eb = '0; et = '0; ep = '0;
    @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      bin_ops[i] = (mode == 0) ? '1 : (mode == 1) ? N'(i + 1) : N'($urandom());
      eb += bin_ops[i];
    end
    for (int i = 0; i < NT; i++) begin
      ter_ops[i] = (mode == 0) ? '1 : (mode == 1) ? N'(i + 1) : N'($urandom());
      et += ter_ops[i];
    end
    for (int i = 0; i < NP; i++) begin
      pipe_ops[i] = (mode == 0) ? '1 : (mode == 1) ? N'(i + 1) : N'($urandom());
      ep += pipe_ops[i];
    end
    in_valid = 1'b1;
    #1;
    checks += 2;
    if (br !== eb) begin failures++; $display("FAIL binary %h != %h", br, eb); end
    if (tr !== et) begin failures++; $display("FAIL ternary %h != %h", tr, et); end
    @(negedge clk);
    in_valid = 1'b0;
    waited = 1;
    while (!pv && waited < 10) begin
      @(negedge clk);
      waited++;
    end
    checks += 2;
    if (waited != LAT) begin
      failures++;
      $display("FAIL pipelined latency %0d, expected %0d", waited, LAT);
    end
    if (pr !== ep) begin failures++; $display("FAIL pipelined %h != %h", pr, ep); end
  endtask

  initial begin
    foreach (bin_ops[i])  bin_ops[i]  = '0;
    foreach (ter_ops[i])  ter_ops[i]  = '0;
    foreach (pipe_ops[i]) pipe_ops[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one_operation(0);
    one_operation(1);
    for (int t = 0; t < 20; t++) one_operation(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
