// tb_exponent_adder: checks E_A + E_B + cin for 8-bit exponents on corners
// and random values, including sums that need the extra output bit.
module tb_exponent_adder;
  int checks = 0, failures = 0;
  logic [7:0] ea, eb;
  logic       cin;
  logic [8:0] esum;

  exponent_adder dut (.ea(ea), .eb(eb), .cin(cin), .esum(esum));

  task automatic check(int a, int b, int c);
    ea = 8'(a); eb = 8'(b); cin = 1'(c);
    #1;
    checks++;
    if (int'(esum) != a + b + c) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d", a, b, c, esum);
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
    check(0, 0, 0);
    check(255, 255, 1);
    check(127, 127, 0);
    check(200, 100, 1);
    repeat (1000) check(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), int'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
