// fplm: logarithmic floating-point multiplier.
//
// Approximates P = A x B for IEEE 754-style operands without a mantissa
// multiplier. Each operand is first moved to its nearest power of two: if the
// fraction x is at least 0.5 the exponent is raised by one and the mantissa
// halved, which makes the mantissa's approximate logarithm (log2(1+k) ~ k)
// negative. The two logarithms are added in (q+1)-bit two's complement, and
// the sum is taken back out of the log domain with 2^k ~ 1 + k. Because one
// operand may be under- and the other over-estimated, the error is
// double-sided and tends to cancel when many products are accumulated.
//
// Datapath (all combinational):
//   sign      = S_A xor S_B
//   M'_A,M'_B = fp_le(M_A), fp_le(M_B)           logarithm estimators
//   M'_P      = M'_A + M'_B                      mantissa_adder, with the
//   mantissa  = M'_P[q] ? {M'_P[q-2:0],0} : M'_P[q-1:0]     normalising mux
//   exponent  = E_A + E_B + cin - bias           one adder, cin from
//               cin = M_A[q-1] + M_B[q-1] - M'_P[q]        carry_in_gen
//   special cases from the operand classes, overflow / underflow from the
//   final exponent, packing                     special_cases, fplm_pack
// There is no rounding stage. Subnormal operands are flushed to zero, an
// overflow gives infinity and an underflow zero; these exception rules are
// this design's own choices.
//
// Parameters: EXP_W exponent bits, MAN_W explicit mantissa bits (>= 2).
// Defaults are single precision (8, 23); (5, 10), (8, 7) and (5, 2) give half
// precision, Bfloat16 and the (1,5,2) FP8 format. There is no clock: the
// product and flags settle one combinational delay after the operands.
module fplm
  import fplm_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] p,
  output fp_flags_t            flags
);

  logic             sa, sb, sp;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb, man_p;
  fp_class_t        cls_a, cls_b;
  logic [MAN_W:0]   la, lb;
  logic             sum_neg, cin;
  logic [EXP_W:0]   esum;
  spc_e             kind;
  logic             invalid, flushed;

  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_a (
    .x(a), .sign(sa), .exp(ea), .man(ma), .cls(cls_a));
  fp_unpack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unpack_b (
    .x(b), .sign(sb), .exp(eb), .man(mb), .cls(cls_b));

  special_cases u_special (
    .cls_a(cls_a), .cls_b(cls_b), .kind(kind), .invalid(invalid), .flushed(flushed));

  assign sp = sa ^ sb;

  fp_le #(.MAN_W(MAN_W)) u_le_a (.man(ma), .man_log(la));
  fp_le #(.MAN_W(MAN_W)) u_le_b (.man(mb), .man_log(lb));

  mantissa_adder #(.MAN_W(MAN_W)) u_man_add (
    .la(la), .lb(lb), .sum_neg(sum_neg), .man_p(man_p));

  carry_in_gen u_cin (
    .ma_msb(ma[MAN_W-1]), .mb_msb(mb[MAN_W-1]), .sum_neg(sum_neg), .cin(cin));

  exponent_adder #(.EXP_W(EXP_W)) u_exp_add (
    .ea(ea), .eb(eb), .cin(cin), .esum(esum));

  fplm_pack #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_pack (
    .sign(sp), .esum(esum), .man_p(man_p), .kind(kind), .invalid(invalid),
    .flushed(flushed), .p(p), .flags(flags));

endmodule
