// Converts an IEEE-754 single number into the redundant FP format, so that a
// butterfly input that does not pass through a multiplier (A) can be added to
// the BSD products.  The 24-bit significand is placed at the same binary point
// as a product significand (46 fraction digits) and becomes all posibits, or
// all negabits when the number is negative.  Zero and subnormal inputs give a
// zero significand with exponent 0.  This conversion is this design's own
// glue between the IEEE interface and the redundant adders.  Combinational.
module fp_to_rfp
  import bsd_pkg::*;
(
  input  fp32_t a,
  output rfp_t  r
);
  logic                  zero;
  logic [RFP_DIGITS-1:0] sig;

  always_comb begin
    zero  = (a[30:23] == '0);
    sig   = zero ? '0 : (RFP_DIGITS'({1'b1, a[22:0]}) << (FRAC_DIGITS - FRAC_BITS));
    r.pos = a[31] ? '0 : sig;
    r.neg = a[31] ? sig : '0;
    r.exp = zero ? ZERO_EXP : RFP_EXP_BITS'(a[30:23]);
  end
endmodule
