// tb_cpa -- self-checking testbench of the final carry-propagate adder.
//
// Checks result and carry out against a 17-bit sum for corner cases
// (all ones plus one, zero) and random words.
module tb_cpa;
  localparam int N = 16;

  logic [N-1:0] x, y, r;
  logic         co;
  int checks = 0, failures = 0;

  cpa dut (.sum_w(x), .carry_w(y), .result(r), .cout(co));

  task automatic check_now();
    int unsigned full;
    full = int'(x) + int'(y);
    checks++;
    if (r !== full[N-1:0] || co !== full[N]) begin
      failures++;
      $display("FAIL %h + %h -> %b %h", x, y, co, r);
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
    x = '1; y = 16'd1; #1 check_now();
    x = '0; y = '0;    #1 check_now();
    x = '1; y = '1;    #1 check_now();
    for (int t = 0; t < 1000; t++) begin
      x = N'($urandom());
      y = N'($urandom());
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
