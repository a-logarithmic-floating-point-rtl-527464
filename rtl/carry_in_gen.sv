// carry_in_gen: carry-in of the exponent adder.
//
// The product exponent is E_A + E_B - bias, plus one for each operand whose
// mantissa MSB is set (that operand was rounded up to the next power of two),
// minus one when the logarithm sum is negative (the mantissa was doubled).
// That correction, M_A[q-1] + M_B[q-1] - M'_P[q], is always 0 or 1: with both
// MSBs clear the sum cannot be negative, and with both set it must be. So a
// single carry-in bit into one adder covers it:
//   cin = (M_A[q-1] & M_B[q-1]) | ((M_A[q-1] | M_B[q-1]) & ~M'_P[q])
// four two-input gates, as in the published design. Purely combinational.
module carry_in_gen (
  input  logic ma_msb,   // M_A[q-1]
  input  logic mb_msb,   // M_B[q-1]
  input  logic sum_neg,  // M'_P[q]
  output logic cin
);

  logic both, either;

  always_comb begin
    both   = ma_msb & mb_msb;
    either = ma_msb | mb_msb;
    cin    = both | (either & ~sum_neg);
  end

endmodule
