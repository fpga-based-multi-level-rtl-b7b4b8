// tb_csa_5to3 -- self-checking testbench of the 5:3 compressor array.
//
// For every bit it counts the ones among the five inputs and checks that
// the sum bit is the count's parity, that cA is the majority of the three
// regular inputs alone (it must not depend on the incoming carries), and
// that cB makes up the rest of the count.  All 32 input combinations per
// bit are applied, then random words.
module tb_csa_5to3;
  localparam int N = 16;

  logic [N-1:0] a, b, c, cai, cbi, s, cao, cbo;
  int checks = 0, failures = 0;

  csa_5to3 dut (.a(a), .b(b), .c(c), .cai(cai), .cbi(cbi),
                .s(s), .cao(cao), .cbo(cbo));

  task automatic check_now();
    int cnt, m3;
    for (int j = 0; j < N; j++) begin
      cnt = int'(a[j]) + int'(b[j]) + int'(c[j]) + int'(cai[j]) + int'(cbi[j]);
      m3  = (int'(a[j]) + int'(b[j]) + int'(c[j])) >= 2 ? 1 : 0;
      checks++;
      if (s[j] !== cnt[0] || int'(cao[j]) != m3 ||
          int'(cbo[j]) != (cnt - int'(s[j]) - 2 * m3) / 2) begin
        failures++;
        $display("FAIL bit %0d: in=%b%b%b%b%b s=%b cao=%b cbo=%b", j,
                 a[j], b[j], c[j], cai[j], cbi[j], s[j], cao[j], cbo[j]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32; p++) begin
      a   = {N{p[0]}};
      b   = {N{p[1]}};
      c   = {N{p[2]}};
      cai = {N{p[3]}};
      cbi = {N{p[4]}};
      #1 check_now();
    end
    for (int t = 0; t < 500; t++) begin
      a   = N'($urandom());
      b   = N'($urandom());
      c   = N'($urandom());
      cai = N'($urandom());
      cbi = N'($urandom());
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
