// mantissa_adder: adds the two approximate logarithms and normalises the
// result into an explicit mantissa.
//
// la and lb are the (q+1)-bit two's-complement outputs of the two logarithm
// estimators. Their sum M'_P = x'_A + x'_B lies in [-0.5, 1), so it fits the
// same format; the hidden '1' of 1 + x'_A + x'_B is not added because it does
// not change the explicit mantissa bits.
//   M'_P[q] = 0: mantissa 1 + x'_A + x'_B, explicit bits M'_P[q-1:0]
//   M'_P[q] = 1: the sum is negative, 1 + x'_A + x'_B lies in [0.5, 1) and is
//                doubled: explicit bits {M'_P[q-2:0], 0}
// sum_neg (= M'_P[q]) tells the exponent path to subtract one. Purely
// combinational; MAN_W must be at least 2.
module mantissa_adder #(
  parameter int unsigned MAN_W = 23
) (
  input  logic [MAN_W:0]   la,
  input  logic [MAN_W:0]   lb,
  output logic             sum_neg,
  output logic [MAN_W-1:0] man_p
);

  logic [MAN_W:0] sum;

  always_comb begin
    sum     = la + lb;  // carry out discarded: the sum stays in range
    sum_neg = sum[MAN_W];
    if (sum_neg) man_p = {sum[MAN_W-2:0], 1'b0};
    else         man_p = sum[MAN_W-1:0];
  end

endmodule
