// tb_fp_unpack: checks field extraction and operand classification for
// single-precision words: zeros, subnormals, infinities, NaNs, normals.
module tb_fp_unpack;
  import fplm_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] x;
  logic        sign;
  logic [7:0]  exp;
  logic [22:0] man;
  fp_class_t   cls;

  fp_unpack dut (.x(x), .sign(sign), .exp(exp), .man(man), .cls(cls));

  task automatic check(logic [31:0] w);
    fp_class_t c;
    x = w;
    #1;
    c.is_zero = w[30:23] == 8'h00 && w[22:0] == 0;
    c.is_sub  = w[30:23] == 8'h00 && w[22:0] != 0;
    c.is_inf  = w[30:23] == 8'hff && w[22:0] == 0;
    c.is_nan  = w[30:23] == 8'hff && w[22:0] != 0;
    checks++;
    if (sign !== w[31] || exp !== w[30:23] || man !== w[22:0] || cls !== c) begin
      failures++;
      $display("FAIL x=%h -> %b %h %h %b", w, sign, exp, man, cls);
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
    check(32'h0000_0000);
    check(32'h8000_0000);
    check(32'h0000_0001);
    check(32'h807f_ffff);
    check(32'h7f80_0000);
    check(32'hff80_0000);
    check(32'h7fc0_0000);
    check(32'h7f80_0001);
    check(32'h3f80_0000);
    check(32'hc049_0fdb);
    repeat (1000) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
