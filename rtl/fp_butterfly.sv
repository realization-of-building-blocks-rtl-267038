// Radix-2 floating-point FFT butterfly on redundant (binary signed-digit)
// arithmetic.
//
// Computes, for complex IEEE-754 single inputs A, B and twiddle factor W,
//     X0 = A + B*W        X1 = A - B*W
// with
//     (BW)re = Bre*Wre - Bim*Wim        (BW)im = Bre*Wim + Bim*Wre.
// The dataflow is the usual one: four real multipliers, one subtractor and one
// adder form B*W, and two adders and two subtractors combine it with A.  Here
// they are grouped into two fused operations: two two-term dot products
// (rfp_dot2) give (BW)re and (BW)im, and two fused add-subtract units
// (rfp_fused_addsub) give A + BW and A - BW for each part from one shared
// alignment.  What makes it fast is the number representation between those
// units: the multipliers (bsd_fp_mult) leave their products as BSD
// significands with an exponent, the adders add such numbers with
// carry-limited BSD adders, and only the four outputs are converted back to
// binary, normalized and rounded (rfp_to_fp).  Each output is rounded once.
//
// Interface: inputs are captured when in_valid is high; the combinational
// datapath sits between an input register and an output register, so results
// appear with out_valid two clock cycles after in_valid, one result per cycle.
// The register stages and the valid flag are this design's choice.
// Synchronous active-low reset clears the valid flags only.
module fp_butterfly
  import bsd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a_re,
  input  fp32_t a_im,
  input  fp32_t b_re,
  input  fp32_t b_im,
  input  fp32_t w_re,
  input  fp32_t w_im,
  output logic  out_valid,
  output fp32_t x0_re,      // (A + BW) real
  output fp32_t x0_im,      // (A + BW) imaginary
  output fp32_t x1_re,      // (A - BW) real
  output fp32_t x1_im       // (A - BW) imaginary
);
  fp32_t ar_q, ai_q, br_q, bi_q, wr_q, wi_q;
  logic  v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      ar_q <= a_re;  ai_q <= a_im;
      br_q <= b_re;  bi_q <= b_im;
      wr_q <= w_re;  wi_q <= w_im;
    end
  end

  // B in BSD form for the multipliers
  bsd_fp_t rb_re, rb_im;
  fp_to_bsd u_b_re (.a(br_q), .r(rb_re));
  fp_to_bsd u_b_im (.a(bi_q), .r(rb_im));

  // B*W as two fused dot products (four redundant multipliers in all)
  rfp_t bw_re, bw_im;
  rfp_dot2 u_bw_re (.b1(rb_re), .w1(wr_q), .b2(rb_im), .w2(wi_q), .sub(1'b1), .r(bw_re));
  rfp_dot2 u_bw_im (.b1(rb_re), .w1(wi_q), .b2(rb_im), .w2(wr_q), .sub(1'b0), .r(bw_im));

  // A in redundant form
  rfp_t ra_re, ra_im;
  fp_to_rfp u_a_re (.a(ar_q), .r(ra_re));
  fp_to_rfp u_a_im (.a(ai_q), .r(ra_im));

  // A +- B*W, one fused add-subtract unit per part
  rfp_t s0_re, s0_im, s1_re, s1_im;
  rfp_fused_addsub u_as_re (.a(ra_re), .b(bw_re), .r_sum(s0_re), .r_diff(s1_re));
  rfp_fused_addsub u_as_im (.a(ra_im), .b(bw_im), .r_sum(s0_im), .r_diff(s1_im));

  // single normalization and rounding per output
  fp32_t f0_re, f0_im, f1_re, f1_im;
  rfp_to_fp u_rnd_x0_re (.r(s0_re), .f(f0_re));
  rfp_to_fp u_rnd_x0_im (.r(s0_im), .f(f0_im));
  rfp_to_fp u_rnd_x1_re (.r(s1_re), .f(f1_re));
  rfp_to_fp u_rnd_x1_im (.r(s1_im), .f(f1_im));

  always_ff @(posedge clk) begin
    if (v_q) begin
      x0_re <= f0_re;  x0_im <= f0_im;
      x1_re <= f1_re;  x1_im <= f1_im;
    end
  end
endmodule
