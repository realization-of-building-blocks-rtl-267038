// Partial-product generator of the redundant multiplier: one partial product
// per pair of multiplier digits.
//
// The multiplicand B is an N-digit BSD vector.  The multiplier is a constant in
// canonical signed-digit form (no two neighbouring digits non-zero), each digit
// given as a non-zero flag w_nz and a sign w_sg.  For the digit pair (i+1, i)
// at most one digit is non-zero, so the partial product is one of
// 0, +B, -B, +2B, -2B.  Two candidates are formed:
//   input 1: 2B (digits n..1, digit 0 zero), gated by w_nz_hi, negated by w_sg_hi
//   input 0:  B (digits n-1..0, digit n zero), gated by w_nz_lo, negated by w_sg_lo
// and a 2:1 multiplexer selected by w_nz_hi picks one, giving an (N+1)-digit
// BSD partial product.  Negation of a BSD number is exact by inverting both its
// posibits and its negabits ((1-p)-(1-n) = n-p), so no "+1" correction term is
// needed.  The two candidates, the gating and the select follow the published
// generator; the digit encoding of the multiplier (flag and sign) is this
// design's reading of its W+ / W- inputs.  Combinational.
module pp_gen #(
  parameter int unsigned N = 24        // significand digits of B
) (
  input  logic [N-1:0] b_pos,
  input  logic [N-1:0] b_neg,
  input  logic         w_nz_hi,        // digit i+1 is non-zero
  input  logic         w_sg_hi,        // digit i+1 is negative
  input  logic         w_nz_lo,        // digit i is non-zero
  input  logic         w_sg_lo,        // digit i is negative
  output logic [N:0]   pp_pos,
  output logic [N:0]   pp_neg
);
  logic [N:0] b1_pos, b1_neg, b2_pos, b2_neg;

  always_comb begin
    // 1 x B and 2 x B, both N+1 digits wide
    b1_pos = {1'b0, b_pos};
    b1_neg = {1'b0, b_neg};
    b2_pos = {b_pos, 1'b0};
    b2_neg = {b_neg, 1'b0};
    if (w_nz_hi) begin
      pp_pos = (b2_pos & {(N+1){w_nz_hi}}) ^ {(N+1){w_sg_hi}};
      pp_neg = (b2_neg & {(N+1){w_nz_hi}}) ^ {(N+1){w_sg_hi}};
    end else begin
      pp_pos = (b1_pos & {(N+1){w_nz_lo}}) ^ {(N+1){w_sg_lo}};
      pp_neg = (b1_neg & {(N+1){w_nz_lo}}) ^ {(N+1){w_sg_lo}};
    end
  end
endmodule
