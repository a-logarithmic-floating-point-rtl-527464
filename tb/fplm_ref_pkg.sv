// fplm_ref_pkg: reference model of the logarithmic floating-point multiplier
// for the testbenches, written from the arithmetic rather than the bits.
//
// ref_mul() takes two operands of a format with ew exponent and mw mantissa
// bits (held right-aligned in 64-bit words) and returns the product the
// multiplier must give, computed with real numbers:
//   x   = M / 2^mw                        fraction of each operand
//   x'  = x                 if x <  0.5   (exponent kept)
//       = floor(2^mw*((1+x)/2 - 1))/2^mw  if x >= 0.5 (exponent + 1; the
//                                          estimator drops the last bit)
//   s   = x'_A + x'_B
//   X_P = 1 + s, E_P = E'_A + E'_B - bias          if s >= 0
//       = 2 (1 + s), E_P = E'_A + E'_B - bias - 1  otherwise
// Special operands follow IEEE 754 with subnormals flushed to zero;
// exponents >= 2^ew - 1 overflow to infinity and exponents <= 0 underflow to
// zero. The expected flags are {invalid, overflow, underflow, flushed}.
// Also: helpers to build operands and to convert words to real values.
package fplm_ref_pkg;

  // 2^n for any integer n, by repeated doubling or halving
  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) repeat (n) r = r * 2.0;
    else repeat (-n) r = r / 2.0;
    return r;
  endfunction

  function automatic longint unsigned field(longint unsigned w, int lsb, int n);
    return (w >> lsb) & ((64'd1 << n) - 1);
  endfunction

  // Value of a normal operand as a real number (sign, exponent and mantissa).
  function automatic real to_real(int ew, int mw, longint unsigned w);
    int  e = int'(field(w, mw, ew));
    longint unsigned m = field(w, 0, mw);
    real v;
    int  bias = (1 << (ew - 1)) - 1;
    v = (1.0 + real'(m) / pow2(mw)) * pow2(e - bias);
    return field(w, ew + mw, 1) != 0 ? -v : v;
  endfunction

  function automatic longint unsigned pack(int ew, int mw, bit s,
                                           longint unsigned e, longint unsigned m);
    return (longint'(s) << (ew + mw)) | (e << mw) | m;
  endfunction

  function automatic void ref_mul(input int ew, input int mw,
                                  input longint unsigned a, input longint unsigned b,
                                  output longint unsigned p, output bit [3:0] flags);
    longint unsigned ea = field(a, mw, ew), eb = field(b, mw, ew);
    longint unsigned ma = field(a, 0, mw),  mb = field(b, 0, mw);
    bit  sp = field(a, ew + mw, 1) != field(b, ew + mw, 1);
    longint unsigned emax = (64'd1 << ew) - 1;
    bit  nan_a = (ea == emax) && ma != 0, nan_b = (eb == emax) && mb != 0;
    bit  inf_a = (ea == emax) && ma == 0, inf_b = (eb == emax) && mb == 0;
    bit  sub_a = (ea == 0) && ma != 0,    sub_b = (eb == 0) && mb != 0;
    bit  zer_a = (ea == 0),               zer_b = (eb == 0);
    int  bias = (1 << (ew - 1)) - 1;
    real scale = pow2(mw);
    real xa, xb, xpa, xpb, s, xp;
    int  epa, epb, ep;
    flags = 4'b0000;
    if (nan_a || nan_b || ((inf_a || inf_b) && (zer_a || zer_b))) begin
      flags[3] = 1'b1;
      p = pack(ew, mw, 1'b0, emax, 64'd1 << (mw - 1));
      return;
    end
    if (inf_a || inf_b) begin
      p = pack(ew, mw, sp, emax, 0);
      return;
    end
    if (zer_a || zer_b) begin
      flags[0] = sub_a || sub_b;
      p = pack(ew, mw, sp, 0, 0);
      return;
    end
    xa = real'(ma) / scale;
    xb = real'(mb) / scale;
    epa = int'(ea);
    epb = int'(eb);
    if (xa >= 0.5) begin xpa = $floor(((1.0 + xa) / 2.0 - 1.0) * scale) / scale; epa++; end
    else xpa = xa;
    if (xb >= 0.5) begin xpb = $floor(((1.0 + xb) / 2.0 - 1.0) * scale) / scale; epb++; end
    else xpb = xb;
    s  = xpa + xpb;
    ep = epa + epb - bias;
    if (s >= 0.0) xp = 1.0 + s;
    else begin xp = 2.0 * (1.0 + s); ep--; end
    if (ep >= int'(emax)) begin
      flags[2] = 1'b1;
      p = pack(ew, mw, sp, emax, 0);
    end else if (ep <= 0) begin
      flags[1] = 1'b1;
      p = pack(ew, mw, sp, 0, 0);
    end else begin
      p = pack(ew, mw, sp, longint'(ep), longint'((xp - 1.0) * scale));
    end
  endfunction

endpackage
