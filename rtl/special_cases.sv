// special_cases: decides, from the classes of the two operands alone,
// whether the product is a special value.
//
// Rules (IEEE 754 multiplication, with subnormals flushed to zero):
//   NaN operand, or infinity times zero/subnormal -> NaN, invalid raised
//   otherwise an infinity operand                 -> infinity
//   otherwise a zero or subnormal operand         -> zero
//   otherwise                                     -> ordinary product
// Flushing subnormal operands is this design's choice: the multiplier always
// assumes a hidden leading '1'. Overflow and underflow of an ordinary product
// are detected later, in fplm_pack. Purely combinational.
module special_cases
  import fplm_pkg::*;
(
  input  fp_class_t cls_a,
  input  fp_class_t cls_b,
  output spc_e      kind,
  output logic      invalid,
  output logic      flushed
);

  logic any_nan, any_inf, any_zero;

  always_comb begin
    any_nan  = cls_a.is_nan | cls_b.is_nan;
    any_inf  = cls_a.is_inf | cls_b.is_inf;
    any_zero = cls_a.is_zero | cls_a.is_sub | cls_b.is_zero | cls_b.is_sub;
    invalid  = any_nan | (any_inf & any_zero);
    flushed  = ~any_nan & ~any_inf & (cls_a.is_sub | cls_b.is_sub);
    if (invalid)       kind = SPC_NAN;
    else if (any_inf)  kind = SPC_INF;
    else if (any_zero) kind = SPC_ZERO;
    else               kind = SPC_NONE;
  end

endmodule
