// Adder/subtractor of two redundant FP numbers (BSD significands): the adder
// of the two-term dot product, forming (BW)re and (BW)im in the butterfly.
//
// r = a + b (sub = 0) or a - b (sub = 1).  Subtraction only swaps b's posibits
// and negabits.  The operand with the smaller exponent is aligned to the other
// by a right shift of both its digit vectors (two barrel shifters, logical
// shift); digits shifted out are dropped, and a distance of 63 or more clears
// the operand.  The aligned significands are summed by one carry-limited
// bsd_adder, so the adder has no carry-propagation chain and its result stays
// redundant and unnormalized, with the larger exponent.  The significands
// leave headroom above the 50 digits a butterfly needs, so the adder's top
// transfer is null (asserted).  The published design adds the products with
// the BSD adder; the alignment and the formats are this design's.
// Combinational.
module rfp_addsub
  import bsd_pkg::*;
(
  input  rfp_t a,
  input  rfp_t b,
  input  logic sub,
  output rfp_t r
);
  localparam int unsigned D   = RFP_DIGITS;
  localparam int unsigned SHW = $clog2(D);

  rfp_t                   bb, hi_op, lo_op;
  logic signed [RFP_EXP_BITS:0] diff;
  logic [SHW-1:0]         shamt;
  logic [D-1:0]           al_pos, al_neg;
  logic                   co_pos, co_neg;

  always_comb begin
    bb     = b;
    if (sub) begin
      bb.pos = b.neg;
      bb.neg = b.pos;
    end
    if (a.exp >= bb.exp) begin
      hi_op   = a;
      lo_op = bb;
    end else begin
      hi_op   = bb;
      lo_op = a;
    end
    diff  = (RFP_EXP_BITS+1)'(hi_op.exp) - (RFP_EXP_BITS+1)'(lo_op.exp);
    shamt = (diff >= (RFP_EXP_BITS+1)'((1 << SHW) - 1)) ? '1 : SHW'(diff);
  end

  barrel_shifter #(.WIDTH(D), .DIRECTION(2)) u_align_pos (
    .data_in(lo_op.pos), .shamt(shamt), .data_out(al_pos));
  barrel_shifter #(.WIDTH(D), .DIRECTION(2)) u_align_neg (
    .data_in(lo_op.neg), .shamt(shamt), .data_out(al_neg));

  bsd_adder #(.DIGITS(D)) u_add (
    .x_pos(hi_op.pos), .x_neg(hi_op.neg),
    .y_pos(al_pos),  .y_neg(al_neg),
    .ci_pos(1'b0),   .ci_neg(1'b0),
    .s_pos(r.pos),   .s_neg(r.neg),
    .co_pos(co_pos), .co_neg(co_neg)
  );

  assign r.exp = hi_op.exp;

  always_comb assert (co_pos == co_neg) else $error("rfp_addsub: significand overflow");
endmodule
