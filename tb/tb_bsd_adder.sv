// Random test of the carry-limited BSD adder at its default width (2 digits,
// exhaustively) and at 16 and 56 digits (random BSD operands and transfers).
// Reference: x + y + ci_pos - ci_neg = s + 2^DIGITS (co_pos - co_neg),
// evaluated on 64-bit integers.
module tb_bsd_adder;
  int checks = 0, failures = 0;

  // default instance
  logic [1:0] a_xp, a_xn, a_yp, a_yn, a_sp, a_sn;
  logic       a_cip, a_cin, a_cop, a_con;
  bsd_adder dut2 (.x_pos(a_xp), .x_neg(a_xn), .y_pos(a_yp), .y_neg(a_yn),
                  .ci_pos(a_cip), .ci_neg(a_cin), .s_pos(a_sp), .s_neg(a_sn),
                  .co_pos(a_cop), .co_neg(a_con));

  logic [15:0] b_xp, b_xn, b_yp, b_yn, b_sp, b_sn;
  logic        b_cip, b_cin, b_cop, b_con;
  bsd_adder #(.DIGITS(16)) dut16 (.x_pos(b_xp), .x_neg(b_xn), .y_pos(b_yp), .y_neg(b_yn),
                  .ci_pos(b_cip), .ci_neg(b_cin), .s_pos(b_sp), .s_neg(b_sn),
                  .co_pos(b_cop), .co_neg(b_con));

  logic [55:0] c_xp, c_xn, c_yp, c_yn, c_sp, c_sn;
  logic        c_cip, c_cin, c_cop, c_con;
  bsd_adder #(.DIGITS(56)) dut56 (.x_pos(c_xp), .x_neg(c_xn), .y_pos(c_yp), .y_neg(c_yn),
                  .ci_pos(c_cip), .ci_neg(c_cin), .s_pos(c_sp), .s_neg(c_sn),
                  .co_pos(c_cop), .co_neg(c_con));

  task automatic check(input longint lhs, input longint rhs, input string what);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL %s: %0d != %0d", what, lhs, rhs);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {a_xp, a_xn, a_yp, a_yn, a_cip, a_cin} = 10'(v);
      #1;
      check(longint'(a_xp) - longint'(a_xn) + longint'(a_yp) - longint'(a_yn)
              + longint'(a_cip) - longint'(a_cin),
            longint'(a_sp) - longint'(a_sn) + 4 * (longint'(a_cop) - longint'(a_con)), "2-digit");
    end
    for (int n = 0; n < 3000; n++) begin
      {b_xp, b_xn} = $urandom;  {b_yp, b_yn} = $urandom;
      {b_cip, b_cin} = 2'($urandom);
      c_xp = {$urandom, $urandom}; c_xn = {$urandom, $urandom};
      c_yp = {$urandom, $urandom}; c_yn = {$urandom, $urandom};
      {c_cip, c_cin} = 2'($urandom);
      #1;
      check(longint'(b_xp) - longint'(b_xn) + longint'(b_yp) - longint'(b_yn)
              + longint'(b_cip) - longint'(b_cin),
            longint'(b_sp) - longint'(b_sn) + (longint'(1) << 16) * (longint'(b_cop) - longint'(b_con)),
            "16-digit");
      check(longint'(c_xp) - longint'(c_xn) + longint'(c_yp) - longint'(c_yn)
              + longint'(c_cip) - longint'(c_cin),
            longint'(c_sp) - longint'(c_sn) + (longint'(1) << 56) * (longint'(c_cop) - longint'(c_con)),
            "56-digit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
