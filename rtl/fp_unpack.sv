// fp_unpack: splits one floating-point operand into its fields and
// classifies it.
//
// The operand is laid out as {sign, biased exponent, explicit mantissa}, with
// EXP_W exponent bits and MAN_W mantissa bits (8 and 23 for IEEE 754 single
// precision, the default). The hidden leading '1' is not stored, so the
// exponent and the explicit mantissa come straight from the word. The class
// output marks zeros, subnormals, infinities and NaNs using the IEEE 754
// encodings, for the special-case logic. Purely combinational.
module fp_unpack
  import fplm_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] x,
  output logic                 sign,
  output logic [EXP_W-1:0]     exp,
  output logic [MAN_W-1:0]     man,
  output fp_class_t            cls
);

  logic exp_zero, exp_ones, man_zero;

  always_comb begin
    sign     = x[EXP_W+MAN_W];
    exp      = x[EXP_W+MAN_W-1:MAN_W];
    man      = x[MAN_W-1:0];
    exp_zero = (exp == '0);
    exp_ones = (exp == '1);
    man_zero = (man == '0);
    cls.is_zero = exp_zero &  man_zero;
    cls.is_sub  = exp_zero & ~man_zero;
    cls.is_inf  = exp_ones &  man_zero;
    cls.is_nan  = exp_ones & ~man_zero;
  end

endmodule
