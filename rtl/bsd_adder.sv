// Carry-limited binary signed-digit adder of DIGITS digits.
//
// A row of DIGITS/2 two-digit slices (bsd_adder_slice).  Each slice passes a
// posibit and a negabit transfer to the next one, but neither depends on a
// transfer from further down, so the delay is that of one slice whatever the
// width: this is what lets the multiplier reduce its partial products without
// any carry-propagating adder.
//   x + y + ci_pos - ci_neg = s + 2^DIGITS * (co_pos - co_neg)
// where every operand is a BSD vector (value pos - neg).  Combinational.
// The default of two digits is the single slice of the published comparison;
// the multiplier and the butterfly adders instantiate wider ones.
module bsd_adder #(
  parameter int unsigned DIGITS = 2   // must be even
) (
  input  logic [DIGITS-1:0] x_pos,
  input  logic [DIGITS-1:0] x_neg,
  input  logic [DIGITS-1:0] y_pos,
  input  logic [DIGITS-1:0] y_neg,
  input  logic              ci_pos,
  input  logic              ci_neg,
  output logic [DIGITS-1:0] s_pos,
  output logic [DIGITS-1:0] s_neg,
  output logic              co_pos,
  output logic              co_neg
);
  localparam int unsigned SLICES = DIGITS / 2;

  logic [SLICES:0] c, cn;

  initial assert (DIGITS % 2 == 0 && DIGITS > 0)
    else $error("bsd_adder: DIGITS must be even");

  assign c[0]  = ci_pos;
  assign cn[0] = ci_neg;

  for (genvar j = 0; j < SLICES; j++) begin : g_slice
    bsd_adder_slice u_slice (
      .x_pos (x_pos[2*j +: 2]),
      .x_neg (x_neg[2*j +: 2]),
      .y_pos (y_pos[2*j +: 2]),
      .y_neg (y_neg[2*j +: 2]),
      .c_in  (c[j]),
      .cn_in (cn[j]),
      .s_pos (s_pos[2*j +: 2]),
      .s_neg (s_neg[2*j +: 2]),
      .c_out (c[j+1]),
      .cn_out(cn[j+1])
    );
  end

  assign co_pos = c[SLICES];
  assign co_neg = cn[SLICES];
endmodule
