// tb_csa_3to2 -- self-checking testbench of the 3:2 carry-save adder row.
//
// Drives random and exhaustive-per-bit patterns on the default 16-bit adder
// and checks every bit against a count of the ones among a[j], b[j], ci[j]
// (sum = count mod 2, carry = count div 2), and the word identity
// a + b + ci == s + 2*co.
module tb_csa_3to2;
  localparam int N = 16;

  logic [N-1:0] a, b, ci, s, co;
  int checks = 0, failures = 0;

  csa_3to2 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic check_now();
    int cnt;
    logic [N+1:0] lhs, rhs;
    for (int j = 0; j < N; j++) begin
      cnt = int'(a[j]) + int'(b[j]) + int'(ci[j]);
      checks++;
      if (s[j] !== cnt[0] || co[j] !== cnt[1]) begin
        failures++;
        $display("FAIL bit %0d: a=%h b=%h ci=%h s=%h co=%h", j, a, b, ci, s, co);
      end
    end
    lhs = {2'b0, a} + {2'b0, b} + {2'b0, ci};
    rhs = {2'b0, s} + {1'b0, co, 1'b0};
    checks++;
    if (lhs !== rhs) begin
      failures++;
      $display("FAIL identity: %h != %h", lhs, rhs);
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
    for (int p = 0; p < 8; p++) begin
      a  = {N{p[0]}};
      b  = {N{p[1]}};
      ci = {N{p[2]}};
      #1 check_now();
    end
    for (int t = 0; t < 500; t++) begin
      a  = N'($urandom());
      b  = N'($urandom());
      ci = N'($urandom());
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
