// Normalize-and-round stage: converts a redundant FP number into an
// IEEE-754 single number.  This is the only place in the butterfly where a
// carry-propagating addition happens.
//
//  1. The BSD significand is made two's complement: v = pos - neg.
//  2. Sign and magnitude are split; a priority search finds the leading one.
//  3. A barrel shifter moves the leading one to the top (left shift).
//  4. The top 24 bits are kept and rounded to nearest, ties to even, from a
//     guard bit and a sticky bit; a rounding carry out of the significand
//     renormalizes it and bumps the exponent.
//  5. exponent = exp + (leading-one position) - 46.  A result above the
//     single range becomes infinity; one below the normal range becomes zero
//     (no subnormals).  A zero significand gives +0.
// Combinational.
module rfp_to_fp
  import bsd_pkg::*;
(
  input  rfp_t  r,
  output fp32_t f
);
  localparam int unsigned D   = RFP_DIGITS;
  localparam int unsigned SHW = $clog2(D);

  logic [D:0]        v;
  logic              sign, is_zero;
  logic [D-1:0]      mag, norm;
  logic [SHW-1:0]    lead, shamt;
  logic [SIG_BITS:0] mant;           // one extra bit for the rounding carry
  logic              guard, sticky, round_up;
  logic signed [RFP_EXP_BITS+1:0] e;

  always_comb begin
    v       = {1'b0, r.pos} - {1'b0, r.neg};
    sign    = v[D];
    mag     = sign ? D'(-v) : v[D-1:0];
    is_zero = (mag == '0);
    lead    = '0;
    for (int i = 0; i < int'(D); i++)
      if (mag[i]) lead = SHW'(i);
    shamt   = SHW'(D - 1) - lead;
  end

  barrel_shifter #(.WIDTH(D), .DIRECTION(0)) u_norm (
    .data_in(mag), .shamt(shamt), .data_out(norm));

  always_comb begin
    guard    = norm[D-SIG_BITS-1];
    sticky   = |norm[D-SIG_BITS-2:0];
    mant     = {1'b0, norm[D-1 -: SIG_BITS]};
    round_up = guard & (sticky | mant[0]);
    mant     = mant + (SIG_BITS+1)'(round_up);
    e        = (RFP_EXP_BITS+2)'(r.exp) + (RFP_EXP_BITS+2)'(lead)
               - (RFP_EXP_BITS+2)'(FRAC_DIGITS);
    if (mant[SIG_BITS]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (is_zero)
      f = '0;
    else if (e >= (1 << EXP_BITS) - 1)
      f = {sign, 8'hff, 23'd0};
    else if (e <= 0)
      f = {sign, 31'd0};
    else
      f = {sign, e[7:0], mant[FRAC_BITS-1:0]};
  end
endmodule
