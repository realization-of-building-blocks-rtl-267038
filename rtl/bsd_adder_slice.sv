// Two-digit slice of the carry-limited binary signed-digit adder.
//
// Adds the BSD digits i and i+1 of two operands x and y (each digit a posibit
// *_pos and a negabit *_neg, value pos - neg) together with two incoming
// transfers from the slice below: a posibit c_in and a negabit cn_in, both of
// weight 2^i.  Four full adders do the work:
//   FA0: ~x_neg[0] + ~y_neg[0] + y_pos[0]  -> u (weight 1), v (weight 2)
//   FA1:  u + x_pos[0] + c_in              -> s_pos[0],     w (weight 2)
//   FA2:  x_pos[1] + ~x_neg[1] + y_pos[1]  -> p (weight 2), c_out (weight 8)
//   FA3:  p + ~y_neg[1] + w                -> s_pos[1],     k (weight 8)
// and the negabits of the result are s_neg[0] = cn_in, s_neg[1] = ~v,
// cn_out = ~k.  Inverting a negabit turns it into a posibit biased by -1; the
// biases cancel against the inverted carries, so that
//   X + Y + c_in - cn_in = S + 4 * (c_out - cn_out)     (X, Y, S: 2-digit values).
// c_out depends on the slice's own digits only, and cn_out only on the slice's
// digits and c_in, so no carry ripples further than into the next slice: the
// delay of an N-digit adder does not grow with N.
//
// The four-full-adder arrangement and the net names follow the published
// two-digit slice; which adder input or output carries an inversion is this
// design's reading, checked by the identity above.  Combinational, no clock.
module bsd_adder_slice (
  input  logic [1:0] x_pos,
  input  logic [1:0] x_neg,
  input  logic [1:0] y_pos,
  input  logic [1:0] y_neg,
  input  logic       c_in,    // posibit transfer into digit i
  input  logic       cn_in,   // negabit transfer into digit i
  output logic [1:0] s_pos,
  output logic [1:0] s_neg,
  output logic       c_out,   // posibit transfer into digit i+2
  output logic       cn_out   // negabit transfer into digit i+2
);
  logic u, v, w, p, k;

  full_adder fa0 (.a(~x_neg[0]), .b(~y_neg[0]), .ci(y_pos[0]), .s(u),        .co(v));
  full_adder fa1 (.a(u),         .b(x_pos[0]),  .ci(c_in),     .s(s_pos[0]), .co(w));
  full_adder fa2 (.a(x_pos[1]),  .b(~x_neg[1]), .ci(y_pos[1]), .s(p),        .co(c_out));
  full_adder fa3 (.a(p),         .b(~y_neg[1]), .ci(w),        .s(s_pos[1]), .co(k));

  assign s_neg[0] = cn_in;
  assign s_neg[1] = ~v;
  assign cn_out   = ~k;
endmodule
