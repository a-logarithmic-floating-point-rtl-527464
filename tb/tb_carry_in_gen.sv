// tb_carry_in_gen: checks the carry-in against M_A[q-1] + M_B[q-1] - M'_P[q]
// for every input combination the datapath can produce (both MSBs clear
// implies a non-negative sum; both set implies a negative one).
module tb_carry_in_gen;
  int checks = 0, failures = 0;
  logic ma, mb, neg, cin;

  carry_in_gen dut (.ma_msb(ma), .mb_msb(mb), .sum_neg(neg), .cin(cin));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {ma, mb, neg} = 3'(i);
      #1;
      if ((!ma && !mb && neg) || (ma && mb && !neg)) continue;
      checks++;
      if (int'(cin) != int'(ma) + int'(mb) - int'(neg)) begin
        failures++;
        $display("FAIL ma=%b mb=%b neg=%b cin=%b", ma, mb, neg, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
