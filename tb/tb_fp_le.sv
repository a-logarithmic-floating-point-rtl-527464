// tb_fp_le: checks the logarithm estimator against x' computed with real
// numbers: x' = x for x < 0.5, else floor(2^q((1+x)/2 - 1))/2^q. Runs the
// default 23-bit mantissa on random and corner values, and a 2-bit mantissa
// (FP8) exhaustively.
module tb_fp_le;
  int checks = 0, failures = 0;

  logic [22:0] man;
  logic [23:0] man_log;
  logic [1:0]  man8;
  logic [2:0]  man_log8;

  fp_le dut (.man(man), .man_log(man_log));
  fp_le #(.MAN_W(2)) dut8 (.man(man8), .man_log(man_log8));

  function automatic real expect_log(int q, longint unsigned m);
    real x = real'(m) / (2.0 ** q);
    if (x < 0.5) return x;
    return $floor(((1.0 + x) / 2.0 - 1.0) * (2.0 ** q)) / (2.0 ** q);
  endfunction

  function automatic real as_real(int q, longint unsigned v);
    // (q+1)-bit two's complement with q fraction bits
    longint signed sv = (v >= (64'd1 << q)) ? longint'(v) - (longint'(1) << (q + 1)) : longint'(v);
    return real'(sv) / (2.0 ** q);
  endfunction

  task automatic check23(logic [22:0] m);
    man = m;
    #1;
    checks++;
    if (as_real(23, 64'(man_log)) != expect_log(23, 64'(m))) begin
      failures++;
      $display("FAIL q=23 man=%h log=%h", m, man_log);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check23(23'h000000);
    check23(23'h3fffff);
    check23(23'h400000);
    check23(23'h400001);
    check23(23'h7fffff);
    repeat (2000) check23(23'($urandom));
    for (int m = 0; m < 4; m++) begin
      man8 = 2'(m);
      #1;
      checks++;
      if (as_real(2, 64'(man_log8)) != expect_log(2, 64'(m))) begin
        failures++;
        $display("FAIL q=2 man=%0d log=%b", m, man_log8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
