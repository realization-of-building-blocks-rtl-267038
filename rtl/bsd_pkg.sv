// Shared types and constants of the redundant floating-point butterfly.
//
// Binary signed-digit (BSD) numbers: every digit d_i is in {-1, 0, +1} and is
// carried on two wires, a posibit p_i (weight +1) and a negabit n_i (weight -1),
// so d_i = p_i - n_i.  A BSD vector is stored as two plain bit vectors, pos and
// neg, of the same width; its value is pos - neg read as unsigned integers.
// Negating a BSD number only swaps (or, equivalently, inverts) the two wires.
//
// A multiplier operand with a BSD significand (bsd_fp_t) has the significand
// width of the IEEE format; its value is (pos - neg) * 2^(exp - BIAS - 23).
//
// Redundant floating-point (RFP) numbers are what flows between the multipliers
// and the adders of the butterfly: an exponent plus a signed BSD significand,
//      value = (pos - neg) * 2^(exp - BIAS - FRAC_DIGITS).
// The sign lives in the digits, and the significand is not normalized; the
// single normalize-and-round step happens at the butterfly outputs.
// The IEEE-754 single format (8-bit exponent, 23-bit fraction, bias 127) is the
// number format the butterfly exchanges with the outside.
package bsd_pkg;

  // IEEE-754 single precision
  localparam int unsigned EXP_BITS  = 8;
  localparam int unsigned FRAC_BITS = 23;
  localparam int unsigned SIG_BITS  = FRAC_BITS + 1;     // with the hidden one
  localparam int unsigned BIAS      = 127;

  // Redundant FP format used inside the butterfly
  localparam int unsigned RFP_DIGITS  = 56;              // BSD significand digits
  localparam int unsigned FRAC_DIGITS = 2 * FRAC_BITS;   // binary point position (46)
  localparam int unsigned RFP_EXP_BITS = 11;             // signed, biased by BIAS

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic signed [RFP_EXP_BITS-1:0] exp;
    logic [RFP_DIGITS-1:0]          pos;
    logic [RFP_DIGITS-1:0]          neg;
  } rfp_t;

  // Floating-point operand with a BSD significand of SIG_BITS digits, as taken
  // by the redundant multiplier:
  //      value = (pos - neg) * 2^(exp - BIAS - FRAC_BITS)
  typedef struct packed {
    logic signed [RFP_EXP_BITS-1:0] exp;
    logic [SIG_BITS-1:0]            pos;
    logic [SIG_BITS-1:0]            neg;
  } bsd_fp_t;

  // Exponent given to an operand that is known to be zero, so that it never
  // dominates the alignment in an addition.
  localparam logic signed [RFP_EXP_BITS-1:0] ZERO_EXP = '0;

endpackage
