// tb_fplm_accuracy: accuracy of the multiplier in the four formats it is
// meant for: single precision (8,23), half precision (5,10), Bfloat16 (8,7)
// and FP8 (5,2).
//
// For each format, NS random pairs are drawn from two distributions:
//   uniform  - both operands uniform on [1, 2)
//   normal   - both operands standard normal (Box-Muller)
// Each real operand is truncated into the format, multiplied by the RTL, and
// the product compared with the exact product of the real operands. The test
// reports the mean relative error distance (MRED) and the average error (AE,
// exact minus approximate). Checks, each against an expected value:
//   uniform MRED    0.0289, 0.0289, 0.0302, 0.2311 (all formats, +/-3%)
//   uniform AE      0.0176 (Bfloat16), 0.5630 (FP8), +/-5%; in the wider
//                   formats the AE is too small to measure against noise
//   normal MRED     0.0288 (single), 0.0300 (Bfloat16), 0.2160 (FP8), +/-5%;
//                   half precision is only reported, because products of
//                   small operands underflow its 5-bit exponent
//   the uniform run sees errors of both signs (double-sided distribution)
module tb_fplm_accuracy;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;

  localparam int NS = 1000000;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk;

  // one multiplier per format, operands right-aligned in 32-bit words
  logic [31:0] a32, b32, p32;
  logic [15:0] a16, b16, p16, abf, bbf, pbf;
  logic [7:0]  a8, b8, p8;
  fp_flags_t   f32, f16, fbf, f8;

  fplm                          u_sp (.a(a32), .b(b32), .p(p32), .flags(f32));
  fplm #(.EXP_W(5), .MAN_W(10)) u_hp (.a(a16), .b(b16), .p(p16), .flags(f16));
  fplm #(.EXP_W(8), .MAN_W(7))  u_bf (.a(abf), .b(bbf), .p(pbf), .flags(fbf));
  fplm #(.EXP_W(5), .MAN_W(2))  u_f8 (.a(a8),  .b(b8),  .p(p8),  .flags(f8));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (2 * NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand01();
    return (real'($urandom) + 0.5) / 4294967296.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(2.0 * PI * urand01());
  endfunction

  // truncate a real into a format; values below the normal range become zero
  function automatic longint unsigned to_fmt(int ew, int mw, real v);
    bit  s = v < 0.0;
    real m = s ? -v : v;
    int  e = 0;
    int  bias = (1 << (ew - 1)) - 1;
    if (m == 0.0) return pack(ew, mw, s, 0, 0);
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0) begin m = m * 2.0; e--; end
    if (e + bias <= 0) return pack(ew, mw, s, 0, 0);
    if (e + bias >= (1 << ew) - 1) return pack(ew, mw, s, (64'd1 << ew) - 1, 0);
    return pack(ew, mw, s, 64'(e + bias), longint'($floor((m - 1.0) * pow2(mw))));
  endfunction

  function automatic real word_val(int ew, int mw, longint unsigned w);
    if (field(w, mw, ew) == 0) return 0.0;
    return to_real(ew, mw, w);
  endfunction

  localparam string FMT[4] = '{"single", "half", "bfloat16", "fp8"};
  localparam real MRED_U[4] = '{0.0289, 0.0289, 0.0302, 0.2311};

  real sum_red[4], sum_err[4];
  int  n_flag[4];  // products that left the format's range (either flag)
  int  n_pos, n_neg;

  task automatic run(bit normal);
    real x, y, ex, ap[4];
    for (int f = 0; f < 4; f++) begin sum_red[f] = 0.0; sum_err[f] = 0.0; n_flag[f] = 0; end
    for (int i = 0; i < NS; i++) begin
      if (normal) begin x = gauss(); y = gauss(); end
      else begin x = 1.0 + urand01(); y = 1.0 + urand01(); end
      if (x == 0.0 || y == 0.0) x = 1.0;
      a32 = 32'(to_fmt(8, 23, x)); b32 = 32'(to_fmt(8, 23, y));
      a16 = 16'(to_fmt(5, 10, x)); b16 = 16'(to_fmt(5, 10, y));
      abf = 16'(to_fmt(8, 7, x));  bbf = 16'(to_fmt(8, 7, y));
      a8  = 8'(to_fmt(5, 2, x));   b8  = 8'(to_fmt(5, 2, y));
      @(negedge clk);
      ex = x * y;
      if (f32.overflow || f32.underflow) n_flag[0]++;
      if (f16.overflow || f16.underflow) n_flag[1]++;
      if (fbf.overflow || fbf.underflow) n_flag[2]++;
      if (f8.overflow  || f8.underflow)  n_flag[3]++;
      ap[0] = word_val(8, 23, 64'(p32));
      ap[1] = word_val(5, 10, 64'(p16));
      ap[2] = word_val(8, 7, 64'(pbf));
      ap[3] = word_val(5, 2, 64'(p8));
      for (int f = 0; f < 4; f++) begin
        sum_red[f] += ((ap[f] > ex) ? ap[f] - ex : ex - ap[f]) / ((ex < 0.0) ? -ex : ex);
        sum_err[f] += ex - ap[f];
      end
      if (!normal) begin
        if (ap[0] > ex) n_pos++;
        if (ap[0] < ex) n_neg++;
      end
    end
  endtask

  task automatic check_ae(string what, real got, real want, real tol);
    checks++;
    if (got < want * (1.0 - tol) || got > want * (1.0 + tol)) begin
      failures++;
      $display("FAIL %s AE %f, expected %f", what, got, want);
    end
  endtask

  task automatic check_mred(string what, real got, real want, real tol);
    checks++;
    if (got < want * (1.0 - tol) || got > want * (1.0 + tol)) begin
      failures++;
      $display("FAIL %s MRED %f, expected %f", what, got, want);
    end
  endtask

  initial begin
    n_pos = 0;
    n_neg = 0;
    a32 = '0; b32 = '0; a16 = '0; b16 = '0; abf = '0; bbf = '0; a8 = '0; b8 = '0;
    @(negedge clk);
    run(1'b0);
    $display("uniform [1,2), %0d samples", NS);
    for (int f = 0; f < 4; f++) begin
      $display("  %-9s MRED %.4f  AE %.6f  out of range %0d", FMT[f], sum_red[f] / NS,
               sum_err[f] / NS, n_flag[f]);
      check_mred({"uniform ", FMT[f]}, sum_red[f] / NS, MRED_U[f], 0.03);
    end
    // average error where it is large enough to measure: 0.0176 and 0.5630
    check_ae("uniform bfloat16", sum_err[2] / NS, 0.0176, 0.05);
    check_ae("uniform fp8", sum_err[3] / NS, 0.5630, 0.05);
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL error not double-sided: %0d over, %0d under", n_pos, n_neg);
    end
    run(1'b1);
    $display("standard normal, %0d samples", NS);
    for (int f = 0; f < 4; f++)
      $display("  %-9s MRED %.4f  AE %.6f  out of range %0d", FMT[f], sum_red[f] / NS,
               sum_err[f] / NS, n_flag[f]);
    check_mred("normal single", sum_red[0] / NS, 0.0288, 0.05);
    check_mred("normal bfloat16", sum_red[2] / NS, 0.0300, 0.05);
    check_mred("normal fp8", sum_red[3] / NS, 0.2160, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
