// tb_mantissa_adder: drives the mantissa adder with logarithms in the range
// the estimators produce ([-0.25, 0.5) with 23 fraction bits) and checks the
// sign output and the normalised explicit mantissa against integer
// arithmetic: with s = x'_A + x'_B scaled by 2^23, the mantissa is s for
// s >= 0 and 2(2^23 + s) - 2^23 for s < 0.
module tb_mantissa_adder;
  localparam int Q = 23;
  int checks = 0, failures = 0, negs = 0;

  logic [Q:0]   la, lb;
  logic         sum_neg;
  logic [Q-1:0] man_p;

  mantissa_adder dut (.la(la), .lb(lb), .sum_neg(sum_neg), .man_p(man_p));

  // random logarithm in [-2^(Q-2), 2^(Q-1)) in units of 2^-Q
  function automatic longint signed rnd_log();
    return longint'($urandom_range(0, 3 * (1 << (Q - 2)) - 1)) - longint'(1 << (Q - 2));
  endfunction

  task automatic check(longint signed a, longint signed b);
    longint signed s = a + b;
    longint signed m;
    bit neg = s < 0;
    la = (Q+1)'(a);
    lb = (Q+1)'(b);
    #1;
    m = neg ? 2 * ((longint'(1) << Q) + s) - (longint'(1) << Q) : s;
    checks++;
    if (sum_neg !== neg || man_p !== Q'(m)) begin
      failures++;
      $display("FAIL a=%0d b=%0d neg=%b man=%h expected %b %h", a, b, sum_neg, man_p, neg, Q'(m));
    end
    if (neg) negs++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(-(1 << (Q - 2)), -(1 << (Q - 2)));            // -0.5, the lowest sum
    check((1 << (Q - 1)) - 1, (1 << (Q - 1)) - 1);      // just below 1
    check(-1, 0);
    check(-(1 << (Q - 2)), (1 << (Q - 2)));             // exactly 0
    repeat (3000) check(rnd_log(), rnd_log());
    checks++;
    if (negs < 100) begin
      failures++;
      $display("FAIL too few negative sums: %0d", negs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
