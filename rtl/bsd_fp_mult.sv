// Redundant floating-point multiplier: B * W for an operand B with a BSD
// significand and a constant W, with the product left in binary signed-digit
// form.
//
// B is a bsd_fp_t: an exponent and 24 BSD digits that carry its sign (it may
// come straight from a previous redundant stage).  W is an IEEE-754 single
// number, meant to be a twiddle factor (a constant).  The multiplier works in
// three parts:
//  * sign and exponent: W's sign is folded into its recoded digits, so the
//    product digits carry the sign.  The exponent is eB + eW - 127.
//  * partial-product generation: W's 24-bit significand is recoded into 25
//    canonical signed digits (csd_recode), padded to 26, and each of the 13
//    digit pairs drives a pp_gen that yields 0, +-B or +-2B (25 digits) at
//    weight 4^j.
//  * partial-product reduction: a tree of carry-limited BSD adders (13 -> 7 ->
//    4 -> 2 -> 1) sums them.  There is no final carry-propagating adder:
//    normalization and rounding are left to the block that consumes the product.
// Output: an rfp_t with value (pos - neg) * 2^(exp - 127 - 46).  A zero W
// (exponent field 0, subnormals included) or a B with exponent 0 (the
// convention for a zero operand) gives a zero product with exponent 0, so it
// never dominates a later alignment.  Infinities and NaNs are not handled.
// The multiplier structure follows the published one; the recoding of W and
// the adder tree shape are this design's choices.  Combinational.
module bsd_fp_mult
  import bsd_pkg::*;
(
  input  bsd_fp_t b,
  input  fp32_t   w,
  output rfp_t  p
);
  localparam int unsigned N      = SIG_BITS;        // 24
  localparam int unsigned WD     = N + 2;           // recoded digits, even (26)
  localparam int unsigned NPP    = WD / 2;          // 13 partial products
  localparam int unsigned D      = RFP_DIGITS;      // 56
  localparam int unsigned LEVELS = $clog2(NPP);     // 4

  // number of operands at level lv of the reduction tree
  function automatic int unsigned cnt(input int unsigned lv);
    int unsigned c = NPP;
    for (int unsigned i = 0; i < lv; i++) c = (c + 1) / 2;
    return c;
  endfunction

  logic        b_zero, w_zero;
  logic [N-1:0] sig_w;
  logic [N-1:0] b_pos, b_neg;
  logic [N:0]   w_nz_r, w_sg_r;
  logic [WD-1:0] w_nz, w_sg;

  always_comb begin
    b_zero = (b.exp == ZERO_EXP);
    w_zero = (w[30:23] == '0);
    sig_w  = w_zero ? '0 : {1'b1, w[22:0]};
    b_pos  = b_zero ? '0 : b.pos;
    b_neg  = b_zero ? '0 : b.neg;
  end

  csd_recode #(.N(N)) u_recode (.x(sig_w), .sign(w[31]), .nz(w_nz_r), .sg(w_sg_r));
  assign w_nz = {1'b0, w_nz_r};
  assign w_sg = {1'b0, w_sg_r};

  // partial products, aligned to their weight 4^j
  logic [D-1:0] pp_pos_a [NPP];
  logic [D-1:0] pp_neg_a [NPP];

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    logic [N:0] pp_pos, pp_neg;
    pp_gen #(.N(N)) u_pp (
      .b_pos(b_pos), .b_neg(b_neg),
      .w_nz_hi(w_nz[2*j+1]), .w_sg_hi(w_sg[2*j+1]),
      .w_nz_lo(w_nz[2*j]),   .w_sg_lo(w_sg[2*j]),
      .pp_pos(pp_pos), .pp_neg(pp_neg)
    );
    assign pp_pos_a[j] = D'(pp_pos) << (2*j);
    assign pp_neg_a[j] = D'(pp_neg) << (2*j);
  end

  // reduction tree: level lv takes cnt(lv) operands and yields cnt(lv+1) sums
  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    logic [D-1:0] in_pos [NPP];
    logic [D-1:0] in_neg [NPP];
    logic [D-1:0] out_pos [NPP];
    logic [D-1:0] out_neg [NPP];
    if (lv == 0) begin : g_src_pp
      assign in_pos = pp_pos_a;
      assign in_neg = pp_neg_a;
    end else begin : g_src_level
      assign in_pos = g_level[lv-1].out_pos;
      assign in_neg = g_level[lv-1].out_neg;
    end
    for (genvar k = 0; k < NPP; k++) begin : g_node
      if (2*k + 1 < cnt(lv)) begin : g_add
        logic co_pos, co_neg;
        bsd_adder #(.DIGITS(D)) u_add (
          .x_pos(in_pos[2*k]),   .x_neg(in_neg[2*k]),
          .y_pos(in_pos[2*k+1]), .y_neg(in_neg[2*k+1]),
          .ci_pos(1'b0), .ci_neg(1'b0),
          .s_pos(out_pos[k]), .s_neg(out_neg[k]),
          .co_pos(co_pos), .co_neg(co_neg)
        );
        // the product fits in 50 digits: the transfer out of the top is null
        always_comb assert (co_pos == co_neg)
          else $error("bsd_fp_mult: reduction overflow");
      end else if (2*k < cnt(lv)) begin : g_pass
        assign out_pos[k] = in_pos[2*k];
        assign out_neg[k] = in_neg[2*k];
      end else begin : g_unused
        assign out_pos[k] = '0;
        assign out_neg[k] = '0;
      end
    end
  end

  always_comb begin
    p.pos = g_level[LEVELS-1].out_pos[0];
    p.neg = g_level[LEVELS-1].out_neg[0];
    if (b_zero || w_zero)
      p.exp = ZERO_EXP;
    else
      p.exp = b.exp + RFP_EXP_BITS'(w[30:23]) - RFP_EXP_BITS'(BIAS);
  end
endmodule
