// Test of the fused two-term dot product b1*w1 +- b2*w2.  Random operands:
// b1, b2 with random BSD significands, w1, w2 random singles (exponents chosen
// so that the two products are sometimes equal in exponent, sometimes far
// apart), zero operands included.  Reference: the two exact integer products
// (pos - neg) * significand of w, the smaller one scaled
// to the larger one's exponent; the redundant result may differ from it by
// less than one unit of its last digit (truncation of the aligned product),
// and its exponent must be the larger product exponent.
module tb_rfp_dot2;
  import bsd_pkg::*;
  import tb_fp_pkg::*;
  bsd_fp_t b1, b2;
  fp32_t   w1, w2;
  logic  sub;
  rfp_t  r;
  int checks = 0, failures = 0;
  int n_far = 0, n_zero = 0, n_sub = 0;

  rfp_dot2 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bsd_fp_t rand_bsd(input int elo, input int ehi);
    bsd_fp_t r;
    r.exp = RFP_EXP_BITS'(elo + int'($urandom % 32'(ehi - elo + 1)));
    r.pos = 24'($urandom) | 24'h800000;
    r.neg = 24'($urandom) & 24'h3fffff;
    if ($urandom % 2 == 1) {r.pos, r.neg} = {r.neg, r.pos};
    return r;
  endfunction

  function automatic longint bval(input bsd_fp_t b);
    return (b.exp == 0) ? 0 : longint'(b.pos) - longint'(b.neg);
  endfunction

  function automatic longint sig_of(input fp32_t f);
    longint s = (f[30:23] == 0) ? 0 : longint'({1'b1, f[22:0]});
    return f[31] ? -s : s;
  endfunction

  initial begin
    longint p1, p2;
    int     e1, e2, ehi, d;
    real    ref_v, got, s1, s2, r1, r2;
    for (int n = 0; n < 3000; n++) begin
      b1 = rand_bsd(100, 150); w1 = rand_fp(100, 150);
      b2 = rand_bsd(100, 150); w2 = rand_fp(100, 150);
      if (n % 4 == 0) begin b2.exp = b1.exp; w2[30:23] = w1[30:23]; end
      if (n % 13 == 0) w2 = 32'd0;
      sub = 1'($urandom);
      #1;
      p1 = bval(b1) * sig_of(w1);
      p2 = bval(b2) * sig_of(w2);
      if (sub) p2 = -p2;
      e1 = (p1 == 0) ? 0 : int'(b1.exp) + int'(w1[30:23]) - 127;
      e2 = (p2 == 0) ? 0 : int'(b2.exp) + int'(w2[30:23]) - 127;
      ehi = (e1 >= e2) ? e1 : e2;
      s1    = pow2(ehi - e1);
      s2    = pow2(ehi - e2);
      r1    = p1;
      r2    = p2;
      ref_v = r1 / s1 + r2 / s2;
      got   = longint'(r.pos) - longint'(r.neg);
      checks++;
      if (got - ref_v >= 1.0 || ref_v - got >= 1.0 || int'(r.exp) != ehi) begin
        failures++;
        $display("FAIL n=%0d got=%f ref=%f exp=%0d/%0d", n, got, ref_v, r.exp, ehi);
      end
      d = ehi - ((e1 >= e2) ? e2 : e1);
      if (d >= 56) n_far++;
      if (p2 == 0) n_zero++;
      if (sub) n_sub++;
    end
    checks += 3;
    if (n_far == 0 || n_zero == 0 || n_sub == 0) failures++;
    $display("far=%0d zero=%0d sub=%0d", n_far, n_zero, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
