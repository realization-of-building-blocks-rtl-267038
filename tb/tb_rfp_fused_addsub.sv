// Test of the fused add-subtract unit.  Random BSD significands of up to 50
// digits, exponents equal, close or far apart in both orders.  Reference, in
// units of the larger exponent's last digit: the aligned operand's posibits
// and negabits truncated separately, then a + b and a - b; both results must
// carry the larger exponent.
module tb_rfp_fused_addsub;
  import bsd_pkg::*;
  rfp_t a, b, r_sum, r_diff;
  int checks = 0, failures = 0;
  int n_ahi = 0, n_bhi = 0, n_far = 0;

  rfp_fused_addsub dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [55:0] rand_digits();
    logic [55:0] v = {$urandom, $urandom};
    return v & ((56'd1 << (46 + $urandom % 5)) - 1);
  endfunction

  initial begin
    longint av, bv, ref_s, ref_d, got_s, got_d;
    int     d, ehi;
    for (int n = 0; n < 4000; n++) begin
      a.pos = rand_digits(); a.neg = rand_digits();
      b.pos = rand_digits(); b.neg = rand_digits();
      a.exp = RFP_EXP_BITS'(int'($urandom % 300));
      case (n % 4)
        0: b.exp = a.exp;
        1: b.exp = RFP_EXP_BITS'(int'(a.exp) + int'($urandom % 81) - 40);
        2: b.exp = RFP_EXP_BITS'(int'(a.exp) + ((n % 8 == 2) ? 60 : -60));
        default: b.exp = RFP_EXP_BITS'(int'(a.exp) + int'($urandom % 9) - 4);
      endcase
      #1;
      if (a.exp >= b.exp) begin
        d   = int'(a.exp) - int'(b.exp);
        ehi = int'(a.exp);
        av  = longint'(a.pos) - longint'(a.neg);
        bv  = (d < 56) ? longint'(b.pos >> d) - longint'(b.neg >> d) : 0;
        n_ahi++;
      end else begin
        d   = int'(b.exp) - int'(a.exp);
        ehi = int'(b.exp);
        bv  = longint'(b.pos) - longint'(b.neg);
        av  = (d < 56) ? longint'(a.pos >> d) - longint'(a.neg >> d) : 0;
        n_bhi++;
      end
      if (d >= 56) n_far++;
      ref_s = av + bv;
      ref_d = av - bv;
      got_s = longint'(r_sum.pos) - longint'(r_sum.neg);
      got_d = longint'(r_diff.pos) - longint'(r_diff.neg);
      checks += 2;
      if (got_s != ref_s || int'(r_sum.exp) != ehi) begin
        failures++;
        $display("FAIL sum n=%0d d=%0d got=%0d ref=%0d", n, d, got_s, ref_s);
      end
      if (got_d != ref_d || int'(r_diff.exp) != ehi) begin
        failures++;
        $display("FAIL diff n=%0d d=%0d got=%0d ref=%0d", n, d, got_d, ref_d);
      end
    end
    checks += 3;
    if (n_ahi == 0 || n_bhi == 0 || n_far == 0) failures++;
    $display("a_larger=%0d b_larger=%0d shifted_out=%0d", n_ahi, n_bhi, n_far);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
