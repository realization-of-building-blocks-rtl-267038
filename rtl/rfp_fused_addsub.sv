// Fused add-subtract unit: r_sum = a + b and r_diff = a - b from one shared
// exponent comparison and alignment.
//
// The operand with the smaller exponent has both of its BSD digit vectors
// shifted right by the exponent difference (two barrel shifters, shared by
// the two results).  Two carry-limited BSD adders then form a + b and
// a + (-b), where -b is the aligned b with its posibits and negabits swapped.
// Both results keep the larger exponent and stay redundant; digits shifted out
// of the aligned operand are dropped, exactly as in rfp_addsub.  In the
// butterfly this unit turns A and B*W into A + B*W and A - B*W for one of the
// real and imaginary parts.  The fused add-subtract operation is named in the
// published design; its organization here is this design's.  Combinational.
module rfp_fused_addsub
  import bsd_pkg::*;
(
  input  rfp_t a,
  input  rfp_t b,
  output rfp_t r_sum,
  output rfp_t r_diff
);
  localparam int unsigned D   = RFP_DIGITS;
  localparam int unsigned SHW = $clog2(D);

  logic                         a_hi;        // a has the larger (or equal) exponent
  logic signed [RFP_EXP_BITS:0] diff;
  logic [SHW-1:0]               shamt;
  logic [D-1:0]                 lo_pos, lo_neg, al_pos, al_neg;
  logic [D-1:0]                 ap, an, bp, bn;
  logic                         co_sp, co_sn, co_dp, co_dn;

  always_comb begin
    a_hi   = (a.exp >= b.exp);
    diff   = a_hi ? (RFP_EXP_BITS+1)'(a.exp) - (RFP_EXP_BITS+1)'(b.exp)
                  : (RFP_EXP_BITS+1)'(b.exp) - (RFP_EXP_BITS+1)'(a.exp);
    shamt  = (diff >= (RFP_EXP_BITS+1)'((1 << SHW) - 1)) ? '1 : SHW'(diff);
    lo_pos = a_hi ? b.pos : a.pos;
    lo_neg = a_hi ? b.neg : a.neg;
  end

  barrel_shifter #(.WIDTH(D), .DIRECTION(2)) u_align_pos (
    .data_in(lo_pos), .shamt(shamt), .data_out(al_pos));
  barrel_shifter #(.WIDTH(D), .DIRECTION(2)) u_align_neg (
    .data_in(lo_neg), .shamt(shamt), .data_out(al_neg));

  always_comb begin
    ap = a_hi ? a.pos : al_pos;
    an = a_hi ? a.neg : al_neg;
    bp = a_hi ? al_pos : b.pos;
    bn = a_hi ? al_neg : b.neg;
  end

  bsd_adder #(.DIGITS(D)) u_sum (
    .x_pos(ap), .x_neg(an), .y_pos(bp), .y_neg(bn), .ci_pos(1'b0), .ci_neg(1'b0),
    .s_pos(r_sum.pos), .s_neg(r_sum.neg), .co_pos(co_sp), .co_neg(co_sn));

  bsd_adder #(.DIGITS(D)) u_diff (
    .x_pos(ap), .x_neg(an), .y_pos(bn), .y_neg(bp), .ci_pos(1'b0), .ci_neg(1'b0),
    .s_pos(r_diff.pos), .s_neg(r_diff.neg), .co_pos(co_dp), .co_neg(co_dn));

  assign r_sum.exp  = a_hi ? a.exp : b.exp;
  assign r_diff.exp = a_hi ? a.exp : b.exp;

  always_comb assert (co_sp == co_sn && co_dp == co_dn)
    else $error("rfp_fused_addsub: significand overflow");
endmodule
