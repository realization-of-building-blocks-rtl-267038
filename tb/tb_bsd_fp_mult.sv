// Test of the redundant FP multiplier.  B operands have random BSD
// significands (arbitrary digit patterns, so also values that no IEEE number
// has) or come from IEEE numbers of either sign; W operands are random IEEE
// singles plus powers of two, all-ones and alternating significands and zero.
// The BSD product must equal the exact integer product (pos_B - neg_B) * sigW
// with W's sign, and the exponent must be eB + eW - 127 (0 for a zero W or a
// B with exponent 0).
module tb_bsd_fp_mult;
  import bsd_pkg::*;
  import tb_fp_pkg::*;
  bsd_fp_t b;
  fp32_t   w, fb;
  rfp_t    p;
  int checks = 0, failures = 0;

  bsd_fp_mult dut (.b(b), .w(w), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    longint vb, sw, ref_v, got;
    int     ref_e;
    #1;
    vb = (b.exp == 0) ? 0 : longint'(b.pos) - longint'(b.neg);
    sw = (w[30:23] == 0) ? 0 : longint'({1'b1, w[22:0]});
    ref_v = vb * sw;
    if (w[31]) ref_v = -ref_v;
    ref_e = (b.exp == 0 || sw == 0) ? 0 : int'(b.exp) + int'(w[30:23]) - 127;
    got = longint'(p.pos) - longint'(p.neg);
    checks++;
    if (got != ref_v || int'(p.exp) != ref_e) begin
      failures++;
      $display("FAIL b=%0d/%0d w=%h got=%0d e=%0d ref=%0d e=%0d", b.exp, vb, w, got, p.exp, ref_v, ref_e);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      fb = rand_fp(1, 254);
      w  = rand_fp(1, 254);
      if (n % 2 == 0) begin
        b.exp = RFP_EXP_BITS'(1 + $urandom % 254);
        b.pos = 24'($urandom);
        b.neg = 24'($urandom);
      end else begin
        b.exp = RFP_EXP_BITS'(fb[30:23]);
        b.pos = fb[31] ? '0 : {1'b1, fb[22:0]};
        b.neg = fb[31] ? {1'b1, fb[22:0]} : '0;
      end
      case (n % 10)
        0: w[22:0] = '0;          // power of two
        1: w[22:0] = '1;          // longest runs of ones
        2: b.exp = '0;            // zero multiplicand
        3: w[22:0] = 23'h555555;  // alternating bits
        4: w = {w[31], 31'd0};    // zero constant
        default: ;
      endcase
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
