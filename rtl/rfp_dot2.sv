// Fused two-term dot product: r = b1*w1 + b2*w2 (sub = 0) or b1*w1 - b2*w2
// (sub = 1): data operands b1, b2 with BSD significands (bsd_fp_t), constant
// operands w1, w2 as IEEE-754 singles, result in redundant FP form.
//
// Two redundant multipliers (bsd_fp_mult) produce BSD products that are never
// rounded or normalized; one redundant adder/subtractor (rfp_addsub) aligns
// and combines them with a carry-limited BSD addition.  The result is left
// redundant for the add-subtract stage of the butterfly, so the whole
// dot product is rounded once, at the butterfly output.  In the butterfly the
// two instances compute (BW)re = Bre*Wre - Bim*Wim and
// (BW)im = Bre*Wim + Bim*Wre.  That the dot product is one fused operation
// follows the published design; its make-up from the blocks above is this
// design's.  Combinational.
module rfp_dot2
  import bsd_pkg::*;
(
  input  bsd_fp_t b1,
  input  fp32_t   w1,
  input  bsd_fp_t b2,
  input  fp32_t   w2,
  input  logic    sub,
  output rfp_t    r
);
  rfp_t p1, p2;

  bsd_fp_mult u_mul1 (.b(b1), .w(w1), .p(p1));
  bsd_fp_mult u_mul2 (.b(b2), .w(w2), .p(p2));
  rfp_addsub  u_add  (.a(p1), .b(p2), .sub(sub), .r(r));
endmodule
