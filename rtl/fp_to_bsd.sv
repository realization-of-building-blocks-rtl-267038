// Converts an IEEE-754 single number into a floating-point operand with a
// BSD significand (bsd_fp_t), the form the redundant multiplier takes.  The
// 24-bit significand becomes all posibits, or all negabits when the number is
// negative; the exponent field is kept.  Zero and subnormal inputs give a zero
// significand with exponent 0.  This conversion is this design's glue between
// the IEEE interface of the butterfly and its multipliers.  Combinational.
module fp_to_bsd
  import bsd_pkg::*;
(
  input  fp32_t   a,
  output bsd_fp_t r
);
  logic                zero;
  logic [SIG_BITS-1:0] sig;

  always_comb begin
    zero  = (a[30:23] == '0);
    sig   = zero ? '0 : {1'b1, a[22:0]};
    r.pos = a[31] ? '0 : sig;
    r.neg = a[31] ? sig : '0;
    r.exp = zero ? ZERO_EXP : RFP_EXP_BITS'(a[30:23]);
  end
endmodule
