// fplm_pkg: types shared by the blocks of the logarithmic floating-point
// multiplier (FPLM).
//
// fp_class_t  - what the unpack stage found an operand to be (zero, subnormal,
//               infinity, NaN). A normal number has all four bits clear.
// spc_e       - the special-case result the special-case logic selects.
// fp_flags_t  - the exception result reported next to every product.
//
// The multiplier handles exceptions by inspecting both operands and the
// final exponent; the particular encodings below are this design's own
// choice, following IEEE 754 conventions.
package fplm_pkg;

  typedef struct packed {
    logic is_zero;   // exponent 0, mantissa 0
    logic is_sub;    // exponent 0, mantissa non-zero (flushed to zero)
    logic is_inf;    // exponent all ones, mantissa 0
    logic is_nan;    // exponent all ones, mantissa non-zero
  } fp_class_t;

  typedef enum logic [1:0] {
    SPC_NONE = 2'd0,  // ordinary product, take the datapath result
    SPC_ZERO = 2'd1,  // signed zero
    SPC_INF  = 2'd2,  // signed infinity
    SPC_NAN  = 2'd3   // quiet NaN
  } spc_e;

  typedef struct packed {
    logic invalid;    // NaN operand, or infinity times zero
    logic overflow;   // exponent too large, result forced to infinity
    logic underflow;  // exponent too small, result forced to zero
    logic flushed;    // a subnormal operand was treated as zero
  } fp_flags_t;

endpackage
