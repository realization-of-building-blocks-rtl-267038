// Random test of the partial-product generator (24-digit multiplicand):
// random BSD multiplicands against every multiplier digit pair, including
// pairs where both digits are non-zero (the generator then follows the upper
// digit).  Reference: 0, +-B or +-2B computed on integers.
module tb_pp_gen;
  logic [23:0] b_pos, b_neg;
  logic [24:0] pp_pos, pp_neg;
  logic        w_nz_hi, w_sg_hi, w_nz_lo, w_sg_lo;
  int checks = 0, failures = 0;
  int seen [5];

  pp_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint bv, expect_v, got;
    int     mult;
    for (int n = 0; n < 4000; n++) begin
      b_pos = 24'($urandom);
      b_neg = 24'($urandom);
      {w_nz_hi, w_sg_hi, w_nz_lo, w_sg_lo} = 4'($urandom);
      #1;
      bv   = longint'(b_pos) - longint'(b_neg);
      mult = w_nz_hi ? (w_sg_hi ? -2 : 2) : (w_nz_lo ? (w_sg_lo ? -1 : 1) : 0);
      seen[mult + 2]++;
      expect_v = bv * mult;
      got      = longint'(pp_pos) - longint'(pp_neg);
      checks++;
      if (got != expect_v) begin
        failures++;
        $display("FAIL b=%0d mult=%0d got=%0d", bv, mult, got);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
