// tb_fplm_pack: checks bias removal, overflow to infinity, underflow to zero
// and the special-case results for single precision (bias 127). Expected
// words are built from the exponent arithmetic, not from the module.
module tb_fplm_pack;
  import fplm_pkg::*;
  int checks = 0, failures = 0;
  logic        sign;
  logic [8:0]  esum;
  logic [22:0] man_p;
  spc_e        kind;
  logic        invalid, flushed;
  logic [31:0] p;
  fp_flags_t   flags;

  fplm_pack dut (.sign(sign), .esum(esum), .man_p(man_p), .kind(kind), .invalid(invalid),
                 .flushed(flushed), .p(p), .flags(flags));

  task automatic check(bit s, int es, logic [22:0] m, spc_e k, bit inv, bit fl);
    logic [31:0] ep;
    bit [3:0] ef;
    int e = es - 127;
    sign = s; esum = 9'(es); man_p = m; kind = k; invalid = inv; flushed = fl;
    #1;
    ef = {inv, 1'b0, 1'b0, fl};
    case (k)
      SPC_NAN:  ep = 32'h7fc0_0000;
      SPC_INF:  ep = {s, 8'hff, 23'h0};
      SPC_ZERO: ep = {s, 31'h0};
      default:
        if (e >= 255)    begin ep = {s, 8'hff, 23'h0}; ef[2] = 1'b1; end
        else if (e <= 0) begin ep = {s, 31'h0};        ef[1] = 1'b1; end
        else             ep = {s, 8'(e), m};
    endcase
    checks++;
    if (p !== ep || flags !== ef) begin
      failures++;
      $display("FAIL s=%b esum=%0d kind=%0d -> %h %b expected %h %b", s, es, k, p, flags, ep, ef);
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
    check(0, 254, 23'h123456, SPC_NONE, 0, 0);   // 1.x * 2^0
    check(1, 128, 23'h7fffff, SPC_NONE, 0, 0);   // smallest normal
    check(0, 127, 23'h000001, SPC_NONE, 0, 0);   // exponent 0: underflow
    check(1, 100, 23'h000001, SPC_NONE, 0, 0);   // below zero: underflow
    check(0, 381, 23'h2aaaaa, SPC_NONE, 0, 0);   // exponent 254, largest normal
    check(1, 382, 23'h2aaaaa, SPC_NONE, 0, 0);   // exponent 255: overflow
    check(0, 511, 23'h000000, SPC_NONE, 0, 0);   // far overflow
    check(0, 0,   23'h000000, SPC_NONE, 0, 0);
    check(1, 300, 23'h555555, SPC_NAN, 1, 0);
    check(1, 300, 23'h555555, SPC_INF, 0, 0);
    check(1, 2,   23'h555555, SPC_INF, 0, 0);
    check(1, 300, 23'h555555, SPC_ZERO, 0, 1);
    repeat (2000)
      check(1'($urandom), int'($urandom_range(0, 511)), 23'($urandom), SPC_NONE, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
