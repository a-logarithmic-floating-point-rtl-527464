// fplm_pack: packs the product and reports the exception result.
//
// The biased exponent of the product is esum - bias, where esum is
// E_A + E_B + carry-in and bias = 2^(EXP_W-1) - 1. It is computed with two
// guard bits so that both range errors can be seen:
//   result exponent >= all-ones : overflow, signed infinity
//   result exponent <= 0        : underflow, signed zero (no subnormal output)
// A special case from the operands (NaN, infinity, zero) takes precedence
// over both. The NaN produced is the quiet NaN with sign 0, exponent all ones
// and mantissa 100...0. No rounding is done: the datapath is approximate by
// construction. The range handling and NaN encoding are this design's
// choices; the multiplier only specifies that overflow, underflow and NaN are
// reported from the operands and the final result. Purely combinational.
module fplm_pack
  import fplm_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                 sign,
  input  logic [EXP_W:0]       esum,
  input  logic [MAN_W-1:0]     man_p,
  input  spc_e                 kind,
  input  logic                 invalid,
  input  logic                 flushed,
  output logic [EXP_W+MAN_W:0] p,
  output fp_flags_t            flags
);

  localparam logic [EXP_W+1:0] BIAS    = (EXP_W+2)'((1 << (EXP_W-1)) - 1);
  localparam logic [EXP_W+1:0] EXP_MAX = (EXP_W+2)'((1 << EXP_W) - 1);

  logic [EXP_W+1:0] e_res;  // two's complement, EXP_W+2 bits
  logic             ovf, unf;

  always_comb begin
    e_res = {1'b0, esum} - BIAS;
    unf   = e_res[EXP_W+1] | (e_res == '0);
    ovf   = ~e_res[EXP_W+1] & (e_res >= EXP_MAX);
    flags = '{invalid: invalid, overflow: 1'b0, underflow: 1'b0, flushed: flushed};
    unique case (kind)
      SPC_NAN:  p = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
      SPC_INF:  p = {sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
      SPC_ZERO: p = {sign, {(EXP_W+MAN_W){1'b0}}};
      default: begin
        if (ovf) begin
          p = {sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
          flags.overflow = 1'b1;
        end else if (unf) begin
          p = {sign, {(EXP_W+MAN_W){1'b0}}};
          flags.underflow = 1'b1;
        end else begin
          p = {sign, e_res[EXP_W-1:0], man_p};
        end
      end
    endcase
  end

endmodule
