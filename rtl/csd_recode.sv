// Canonical signed-digit (non-adjacent form) recoder for the constant
// multiplier operand.
//
// Turns an N-bit unsigned magnitude x and a sign into N+1 signed digits in
// {-1, 0, +1}, no two neighbours non-zero, each digit given as a non-zero flag
// and a sign bit.  With z = 3x, digit i equals z[i+1] - x[i+1].  A negative
// sign flips the sign of every non-zero digit.  Because the multiplier operand
// of the butterfly is a twiddle factor, this recoding can be done once per
// constant; here it is plain combinational logic.  The published generator
// takes its multiplier digits as W+/W- pairs; using canonical signed digits to
// produce them is this design's choice.
module csd_recode #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] x,
  input  logic         sign,
  output logic [N:0]   nz,
  output logic [N:0]   sg
);
  logic [N+1:0] z, xe;

  always_comb begin
    xe = {2'b00, x};
    z  = xe + {xe[N:0], 1'b0};        // 3x, never overflows N+2 bits
    for (int i = 0; i <= N; i++) begin
      nz[i] = z[i+1] ^ xe[i+1];
      sg[i] = nz[i] & (sign ^ xe[i+1]);   // digit -1 when x[i+1]=1, z[i+1]=0
    end
  end
endmodule
