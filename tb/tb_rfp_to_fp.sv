// Test of the normalize-and-round stage: random BSD significands of random
// length (1 to 53 digits) and signs, exponents spread over and beyond the
// single range, plus zero and exact-tie cases.  The reference is an
// independent integer rounding to nearest-even (tb_fp_pkg::round_int).
// Counts round-ups, rounding carries that bump the exponent, infinities and
// flushes to zero.
module tb_rfp_to_fp;
  import bsd_pkg::*;
  import tb_fp_pkg::*;
  rfp_t  r;
  fp32_t f;
  int checks = 0, failures = 0;
  int n_inf = 0, n_zero = 0, n_carry = 0;

  rfp_to_fp dut (.r(r), .f(f));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    fp32_t  expect_f;
    int     len;
    for (int n = 0; n < 5000; n++) begin
      len   = 1 + int'($urandom % 53);
      r.pos = {$urandom, $urandom} & ((56'd1 << len) - 1);
      r.neg = {$urandom, $urandom} & ((56'd1 << len) - 1);
      case (n % 8)
        0: r.neg = '0;                                   // plain binary
        1: begin r.pos = (56'd1 << len) - 1; r.neg = '0; end   // rounding carry
        2: begin r.pos = (56'd1 << 40) | (56'd3 << 16); r.neg = '0; end // tie, odd
        3: r.pos = r.neg;                                // zero
        default: ;
      endcase
      r.exp = RFP_EXP_BITS'(int'($urandom % 330) - 30);
      #1;
      v        = longint'(r.pos) - longint'(r.neg);
      expect_f = round_int(v, int'(r.exp));
      checks++;
      if (f != expect_f) begin
        failures++;
        $display("FAIL v=%0d exp=%0d got=%h ref=%h", v, r.exp, f, expect_f);
      end
      if (f[30:23] == 8'hff) n_inf++;
      if (f[30:0] == 0) n_zero++;
      if (n % 8 == 1 && len > 25) n_carry++;
    end
    checks += 3;
    if (n_inf == 0 || n_zero == 0 || n_carry == 0) failures++;
    $display("inf=%0d zero=%0d carry=%0d", n_inf, n_zero, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
