// exponent_adder: the single exponent adder of the multiplier.
//
// Adds the two biased exponents and the carry-in from carry_in_gen. The sum
// carries the bias twice; fplm_pack removes one bias and checks the range.
// The output is one bit wider than the exponents so it never wraps.
// Purely combinational.
module exponent_adder #(
  parameter int unsigned EXP_W = 8
) (
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  input  logic             cin,
  output logic [EXP_W:0]   esum
);

  always_comb esum = {1'b0, ea} + {1'b0, eb} + {{EXP_W{1'b0}}, cin};

endmodule
