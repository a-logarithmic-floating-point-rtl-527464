// fp_le: floating-point logarithm estimator.
//
// Gives the approximate base-2 logarithm x' of an operand's mantissa taken
// relative to the operand's nearest power of two, using log2(1+k) ~ k.
// If the fraction x is below 0.5 (M[q-1] = 0) the nearest power of two is the
// one the exponent already names and x' = x. Otherwise the next power up is
// nearer, and x' = (1+x)/2 - 1, a negative number in [-0.25, 0).
//
// Output M'[q:0] is a (q+1)-bit two's-complement value with q fraction bits
// (q = MAN_W): a 2-to-1 multiplexer selected by M[q-1] picks
//   M[q-1] = 0:  0 . M[q-1] M[q-2] ... M[0]
//   M[q-1] = 1:  1 . 1 M[q-1] ... M[1]      (M[0] is dropped)
// which is exactly the structure of the published estimator. Purely
// combinational; MAN_W must be at least 2.
module fp_le #(
  parameter int unsigned MAN_W = 23
) (
  input  logic [MAN_W-1:0] man,
  output logic [MAN_W:0]   man_log
);

  always_comb begin
    if (man[MAN_W-1]) man_log = {1'b1, 1'b1, man[MAN_W-1:1]};
    else              man_log = {1'b0, man};
  end

endmodule
