// tb_fplm: end-to-end test of the multiplier at its default single-precision
// parameters, against the real-number reference model in fplm_ref_pkg.
//
// One pair of operands is applied per clock cycle. The stream mixes random
// normal operands over the whole exponent range, operands whose exponents
// sum near the overflow and underflow limits, and zeros, subnormals,
// infinities and NaNs. Every product and flag word must match the model
// exactly; every ordinary product must also lie within 12% of the exact
// product. The test counts how often each mechanism fired and fails if one
// never did: both settings of the normalising multiplexer, all six reachable
// carry-in cases, NaN / infinity / zero / flushed-subnormal operands,
// infinity times zero, overflow and underflow, and errors of both signs.
// A watchdog ends the run after a fixed number of cycles.
module tb_fplm;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;

  localparam int EW = 8, MW = 23, NVEC = 20000;

  int checks = 0, failures = 0;
  logic clk;
  logic [31:0] a, b, p;
  fp_flags_t   flags;

  // mechanism counters
  int n_mux0, n_mux1, n_nan, n_inv_inf0, n_inf, n_zero, n_flush, n_ovf, n_unf;
  int n_pos_err, n_neg_err;
  int n_cin[8];  // indexed by {M_A[q-1], M_B[q-1], M'_P[q]}

  fplm dut (.a(a), .b(b), .p(p), .flags(flags));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_normal(int emin, int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  function automatic logic [31:0] rnd_special();
    case ($urandom_range(0, 4))
      0: return {1'($urandom), 31'h0};                                    // zero
      1: return {1'($urandom), 8'h00, 23'($urandom_range(1, 23'h7fffff))}; // subnormal
      2: return {1'($urandom), 8'hff, 23'h0};                              // infinity
      3: return {1'($urandom), 8'hff, 23'($urandom_range(1, 23'h7fffff))}; // NaN
      default: return rnd_normal(1, 254);
    endcase
  endfunction

  // sign of x'_A + x'_B, worked out from the operands: the logarithm of a
  // mantissa M is M for M < 2^22, else M/2 - 2^22 (in units of 2^-23)
  function automatic bit log_sum_negative(logic [22:0] ma, logic [22:0] mb);
    int la = ma[22] ? (int'(ma) >> 1) - (1 << 22) : int'(ma);
    int lb = mb[22] ? (int'(mb) >> 1) - (1 << 22) : int'(mb);
    return la + lb < 0;
  endfunction

  task automatic apply(logic [31:0] va, logic [31:0] vb);
    bit neg;
    longint unsigned ep;
    bit [3:0] ef;
    real exact, approx, rel;
    a = va;
    b = vb;
    @(negedge clk);
    ref_mul(EW, MW, 64'(va), 64'(vb), ep, ef);
    checks++;
    if (p !== 32'(ep) || flags !== ef) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h * %h = %h flags %b, expected %h flags %b", va, vb, p, flags, 32'(ep), ef);
    end
    // mechanism bookkeeping
    if (flags.invalid) begin
      if (va[30:23] == 8'hff && va[22:0] != 0 || vb[30:23] == 8'hff && vb[22:0] != 0) n_nan++;
      else n_inv_inf0++;
    end else if (va[30:23] == 8'hff || vb[30:23] == 8'hff) n_inf++;
    else if (flags.flushed) n_flush++;
    else if (va[30:23] == 8'h00 || vb[30:23] == 8'h00) n_zero++;
    else begin
      if (flags.overflow) n_ovf++;
      else if (flags.underflow) n_unf++;
      else begin
        exact  = to_real(EW, MW, 64'(va)) * to_real(EW, MW, 64'(vb));
        approx = to_real(EW, MW, 64'(p));
        rel    = (approx - exact) / exact;
        checks++;
        if (rel > 0.12 || rel < -0.12) begin
          failures++;
          $display("FAIL relative error %f for %h * %h", rel, va, vb);
        end
        if (rel > 0.0) n_pos_err++;
        if (rel < 0.0) n_neg_err++;
      end
      neg = log_sum_negative(va[22:0], vb[22:0]);
      if (neg) n_mux1++; else n_mux0++;
      n_cin[{va[22], vb[22], neg}]++;
    end
  endtask

  task automatic require(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    n_mux0 = 0; n_mux1 = 0; n_nan = 0; n_inv_inf0 = 0; n_inf = 0; n_zero = 0;
    n_flush = 0; n_ovf = 0; n_unf = 0; n_pos_err = 0; n_neg_err = 0;
    foreach (n_cin[i]) n_cin[i] = 0;
    a = '0;
    b = '0;
    @(negedge clk);
    // 1.25 * 1.25: both fractions below 0.5, x' = 0.25 each -> 1.5
    apply(32'h3fa0_0000, 32'h3fa0_0000);
    checks++;
    if (p !== 32'h3fc0_0000) begin failures++; $display("FAIL 1.25*1.25 = %h", p); end
    // 1.5 * 1.5: both rounded up, x' = -0.25 each, sum -0.5 -> 2.0; the
    // exponent gains 2, loses 1 for the negative sum: carry-in 1
    apply(32'h3fc0_0000, 32'h3fc0_0000);
    checks++;
    if (p !== 32'h4000_0000) begin
      failures++; $display("FAIL 1.5*1.5 = %h", p);
    end
    // -3 * 0.5 = -1.5 (x' = -0.25 for 3 = 1.5*2, 0 for 0.5)
    apply(32'hc040_0000, 32'h3f00_0000);
    checks++;
    if (p !== 32'hbfc0_0000) begin failures++; $display("FAIL -3*0.5 = %h", p); end
    for (int i = 0; i < NVEC; i++) begin
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: apply(rnd_normal(1, 254), rnd_normal(1, 254));
        5:  apply(rnd_normal(64, 127), rnd_normal(64, 127));            // around 1.0
        6:  apply(rnd_normal(190, 254), rnd_normal(190, 254));          // near overflow
        7:  apply(rnd_normal(1, 64), rnd_normal(1, 64));                // near underflow
        default: apply(rnd_special(), rnd_special());
      endcase
    end
    $display("mechanisms:");
    require("mux: sum >= 0", n_mux0);
    require("mux: sum < 0, mantissa x2", n_mux1);
    require("cin: 0,0,+ (cin 0)", n_cin[3'b000]);
    require("cin: 0,1,+ (cin 1)", n_cin[3'b010]);
    require("cin: 0,1,- (cin 0)", n_cin[3'b011]);
    require("cin: 1,0,+ (cin 1)", n_cin[3'b100]);
    require("cin: 1,0,- (cin 0)", n_cin[3'b101]);
    require("cin: 1,1,- (cin 1)", n_cin[3'b111]);
    require("NaN operand", n_nan);
    require("infinity x zero", n_inv_inf0);
    require("infinity operand", n_inf);
    require("zero operand", n_zero);
    require("subnormal flushed", n_flush);
    require("overflow", n_ovf);
    require("underflow", n_unf);
    require("overestimated product", n_pos_err);
    require("underestimated product", n_neg_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
