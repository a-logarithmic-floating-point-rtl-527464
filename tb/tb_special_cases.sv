// tb_special_cases: every pair of operand classes (normal, zero, subnormal,
// infinity, NaN) against the IEEE 754 multiplication rules with subnormals
// flushed to zero.
module tb_special_cases;
  import fplm_pkg::*;
  int checks = 0, failures = 0;
  fp_class_t cls_a, cls_b;
  spc_e      kind;
  logic      invalid, flushed;

  special_cases dut (.cls_a(cls_a), .cls_b(cls_b), .kind(kind), .invalid(invalid), .flushed(flushed));

  // class index: 0 normal, 1 zero, 2 subnormal, 3 infinity, 4 NaN
  function automatic fp_class_t mk(int c);
    fp_class_t r = '0;
    r.is_zero = c == 1;
    r.is_sub  = c == 2;
    r.is_inf  = c == 3;
    r.is_nan  = c == 4;
    return r;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        automatic spc_e k;
        automatic bit inv, fl;
        automatic bit zero_a = i == 1 || i == 2;
        automatic bit zero_b = j == 1 || j == 2;
        cls_a = mk(i);
        cls_b = mk(j);
        #1;
        inv = i == 4 || j == 4 || (i == 3 && zero_b) || (j == 3 && zero_a);
        fl  = !inv && i != 3 && j != 3 && (i == 2 || j == 2);
        k   = inv ? SPC_NAN : (i == 3 || j == 3) ? SPC_INF : (zero_a || zero_b) ? SPC_ZERO : SPC_NONE;
        checks++;
        if (kind !== k || invalid !== inv || flushed !== fl) begin
          failures++;
          $display("FAIL classes %0d,%0d -> kind %0d inv %b fl %b", i, j, kind, invalid, flushed);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
