// Reference helpers shared by the testbenches: conversions between IEEE-754
// single bit patterns, real numbers and integer significands, written
// independently of the design's arithmetic.
package tb_fp_pkg;

  // 2^e as a real number
  function automatic real pow2(input int e);
    real m = 1.0;
    for (int i = 0; i < e; i++) m = m * 2.0;
    for (int i = 0; i > e; i--) m = m / 2.0;
    return m;
  endfunction

  // IEEE single -> real (zero and subnormal patterns read as zero)
  function automatic real fp2real(input logic [31:0] f);
    real m;
    int  e;
    int  frac;
    if (f[30:23] == 8'd0) return 0.0;
    frac = int'(f[22:0]);
    m = 1.0 + $itor(frac) / 8388608.0;
    e = int'(f[30:23]) - 127;
    for (int i = 0; i < e; i++) m = m * 2.0;
    for (int i = 0; i > e; i--) m = m / 2.0;
    if (f[31]) m = -m;
    return m;
  endfunction

  // real -> IEEE single, rounded to nearest even through the double pattern
  // (for normal values in the single range only)
  function automatic logic [31:0] real2fp(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [28:0] rest;
    int          e;
    if (r == 0.0) return 32'd0;
    d    = $realtobits(r);
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b0, d[51:29]};
    rest = d[28:0];
    if (rest[28] && (rest[27:0] != 0 || m[0])) m = m + 1;
    if (m[23]) begin
      m = '0;
      e = e + 1;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal IEEE single with biased exponent in [elo, ehi]
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(elo + int'($urandom % 32'(ehi - elo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // exact IEEE single rounding (to nearest, ties to even) of the value
  // v * 2^(exp - 127 - 46), v a signed integer; no subnormals: results
  // below the normal range give a signed zero, above it infinity
  function automatic logic [31:0] round_int(input longint v, input int exp);
    logic [63:0] mag;
    logic        s;
    int          msb, e;
    logic [63:0] kept, rem, half;
    s   = (v < 0);
    mag = s ? 64'(-v) : 64'(v);
    if (mag == 0) return 32'd0;
    msb = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) msb = i;
    e = exp + msb - 46;
    if (msb <= 23) begin
      kept = mag << (23 - msb);
    end else begin
      kept = mag >> (msb - 23);
      rem  = mag & ((64'd1 << (msb - 23)) - 1);
      half = 64'd1 << (msb - 24);
      if (rem > half || (rem == half && kept[0])) kept = kept + 1;
      if (kept[24]) begin
        kept = kept >> 1;
        e    = e + 1;
      end
    end
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), kept[22:0]};
  endfunction

endpackage
