// Test of the redundant FP adder/subtractor.  Operands have random BSD
// significands of up to 50 digits and exponents up to 80 apart (both orders,
// equal exponents included).  Reference, in units of the result's last digit:
// the larger-exponent operand plus the other's posibits and negabits each
// truncated by the exponent difference; the result exponent must be the
// larger one.  Counts that additions, subtractions, equal exponents and
// shifts past the significand all occurred.
module tb_rfp_addsub;
  import bsd_pkg::*;
  rfp_t a, b, r;
  logic sub;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_eq = 0, n_far = 0;

  rfp_addsub dut (.a(a), .b(b), .sub(sub), .r(r));

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
    rfp_t   hi, lo, bb;
    int     d;
    longint ref_v, got;
    for (int n = 0; n < 4000; n++) begin
      a.pos = rand_digits(); a.neg = rand_digits();
      b.pos = rand_digits(); b.neg = rand_digits();
      a.exp = RFP_EXP_BITS'(int'($urandom % 300));
      case (n % 4)
        0: b.exp = a.exp;
        1: b.exp = RFP_EXP_BITS'(int'(a.exp) + int'($urandom % 81) - 40);
        2: b.exp = RFP_EXP_BITS'(int'(a.exp) - 60 - int'($urandom % 20));
        default: b.exp = RFP_EXP_BITS'(int'(a.exp) + int'($urandom % 9) - 4);
      endcase
      sub = 1'($urandom);
      #1;
      bb = b;
      if (sub) begin bb.pos = b.neg; bb.neg = b.pos; end
      if (a.exp >= bb.exp) begin hi = a; lo = bb; end else begin hi = bb; lo = a; end
      d = int'(hi.exp) - int'(lo.exp);
      ref_v = longint'(hi.pos) - longint'(hi.neg);
      if (d < 56) ref_v += longint'(lo.pos >> d) - longint'(lo.neg >> d);
      got = longint'(r.pos) - longint'(r.neg);
      checks++;
      if (got != ref_v || r.exp != hi.exp) begin
        failures++;
        $display("FAIL n=%0d d=%0d sub=%b got=%0d ref=%0d", n, d, sub, got, ref_v);
      end
      if (sub) n_sub++; else n_add++;
      if (d == 0) n_eq++;
      if (d >= 56) n_far++;
    end
    checks += 4;
    if (n_add == 0 || n_sub == 0 || n_eq == 0 || n_far == 0) failures++;
    $display("adds=%0d subs=%0d equal_exp=%0d shifted_out=%0d", n_add, n_sub, n_eq, n_far);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
