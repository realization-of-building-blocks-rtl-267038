// End-to-end test of the floating-point butterfly at its default sizes.
//
// Streams input sets back to back (one per clock, with some idle cycles) and
// checks every output set against a double-precision reference of
// A + B*W and A - B*W.  An output passes when it is within one unit in the last
// place of the single-precision result plus 2^-40 of the largest term that
// entered the sum (the bound of any fixed-width aligned addition when terms
// cancel).  Twiddle factors are the 16 roots of unity of a 16-point FFT plus
// random values.  The latency must be exactly two clock cycles.
//
// Mechanisms that must each occur at least once: operand alignment by a
// non-zero distance, alignment that shifts an operand out completely, a zero
// operand, a negative result, cancellation to an exact zero, a rounding
// increment, and overflow to infinity.
module tb_fp_butterfly;
  import bsd_pkg::*;
  import tb_fp_pkg::*;

  localparam int NVEC = 3000;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  fp32_t a_re, a_im, b_re, b_im, w_re, w_im;
  fp32_t x0_re, x0_im, x1_re, x1_im;

  fp_butterfly dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, in input order
  typedef struct {
    real   r [4];        // x0_re, x0_im, x1_re, x1_im
    real   big [4];      // largest term magnitude per output
  } exp_t;

  int n_align = 0, n_shift_out = 0, n_zero_in = 0, n_neg = 0, n_cancel = 0,
      n_round = 0, n_inf = 0;

  initial begin
    #(10 * (4 * NVEC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real maxr(input real x, input real y);
    return (x > y) ? x : y;
  endfunction
  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check_out(input fp32_t got, input real ref_v, input real big, input string nm);
    real g, tol;
    checks++;
    if (absr(ref_v) >= 3.4028235677973366e38) begin
      if (got[30:0] != 31'h7f800000) begin
        failures++;
        $display("FAIL %s: expected infinity, got %h", nm, got);
      end
      return;
    end
    g   = fp2real(got);
    tol = absr(ref_v) * pow2(-23) + big * pow2(-40) + 1.0e-300;
    if (absr(g - ref_v) > tol) begin
      failures++;
      $display("FAIL %s: got %h (%e) ref %e", nm, got, g, ref_v);
    end
    if (got[31] && got[30:0] != 0) n_neg++;
  endtask

  // input sets, generated before the run
  localparam int NV = NVEC + 3;
  fp32_t vin [NV][6];
  exp_t  ve  [NV];
  int    issue_cycle [NV];
  int    idx = 0, out_idx = 0;
  logic  running = 1'b0;

  // reference and operand-visible mechanisms of one input set
  task automatic prepare(input int i);
    real Ar, Ai, Br, Bi, Wr, Wi, prr, pii, pri, pir;
    int  ea, ep;
    Ar = fp2real(vin[i][0]); Ai = fp2real(vin[i][1]);
    Br = fp2real(vin[i][2]); Bi = fp2real(vin[i][3]);
    Wr = fp2real(vin[i][4]); Wi = fp2real(vin[i][5]);
    prr = Br * Wr; pii = Bi * Wi; pri = Br * Wi; pir = Bi * Wr;
    ve[i].r[0] = Ar + (prr - pii);  ve[i].r[1] = Ai + (pri + pir);
    ve[i].r[2] = Ar - (prr - pii);  ve[i].r[3] = Ai - (pri + pir);
    ve[i].big[0] = maxr(absr(Ar), maxr(absr(prr), absr(pii)));
    ve[i].big[1] = maxr(absr(Ai), maxr(absr(pri), absr(pir)));
    ve[i].big[2] = ve[i].big[0];
    ve[i].big[3] = ve[i].big[1];
    ea = int'(vin[i][0][30:23]);
    ep = (vin[i][2][30:23] == 0 || vin[i][4][30:23] == 0) ? 0
         : int'(vin[i][2][30:23]) + int'(vin[i][4][30:23]) - 127;
    if (ea != 0 && ep != 0 && ea != ep) n_align++;
    if (ea != 0 && ep != 0 && (ea - ep >= 56 || ep - ea >= 56)) n_shift_out++;
    for (int k = 0; k < 6; k++) if (vin[i][k][30:23] == 0) begin n_zero_in++; break; end
  endtask

  // driver: one input set per cycle, idle every eighth cycle
  always @(posedge clk) begin
    if (running && idx < NV && cycle % 8 != 0) begin
      {a_re, a_im, b_re, b_im, w_re, w_im} <=
        {vin[idx][0], vin[idx][1], vin[idx][2], vin[idx][3], vin[idx][4], vin[idx][5]};
      in_valid         <= 1'b1;
      issue_cycle[idx] <= cycle;
      idx              <= idx + 1;
    end else begin
      in_valid <= 1'b0;
    end
  end

  // output checker
  always @(posedge clk) begin
    if (out_valid) begin
      if (out_idx >= NV) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        checks++;
        if (cycle - issue_cycle[out_idx] != 3) begin
          failures++;
          $display("FAIL latency of set %0d: %0d", out_idx, cycle - issue_cycle[out_idx] - 1);
        end
        check_out(x0_re, ve[out_idx].r[0], ve[out_idx].big[0], "x0_re");
        check_out(x0_im, ve[out_idx].r[1], ve[out_idx].big[1], "x0_im");
        check_out(x1_re, ve[out_idx].r[2], ve[out_idx].big[2], "x1_re");
        check_out(x1_im, ve[out_idx].r[3], ve[out_idx].big[3], "x1_im");
        if (x0_re[30:0] == 0 || x1_re[30:0] == 0 || x0_im[30:0] == 0 || x1_im[30:0] == 0)
          n_cancel++;
        if (x0_re[30:23] == 8'hff || x1_re[30:23] == 8'hff) n_inf++;
        out_idx <= out_idx + 1;
      end
    end
  end

  // rounding increments inside the four output rounders
  always @(posedge clk)
    if (dut.v_q && (dut.u_rnd_x0_re.round_up || dut.u_rnd_x0_im.round_up ||
                    dut.u_rnd_x1_re.round_up || dut.u_rnd_x1_im.round_up))
      n_round++;

  initial begin
    fp32_t tw_re [16], tw_im [16];
    for (int k = 0; k < 16; k++) begin
      tw_re[k] = real2fp($cos(2.0 * 3.14159265358979323846 * k / 16.0));
      tw_im[k] = real2fp(-$sin(2.0 * 3.14159265358979323846 * k / 16.0));
    end
    // directed: exact cancellation A = -B*W with W = 1
    vin[0] = '{32'hbfc00000, 32'h40200000, 32'h3fc00000, 32'hc0200000, 32'h3f800000, 32'h00000000};
    // directed: overflow to infinity
    vin[1] = '{32'h00000000, 32'h00000000, 32'h7e800000, 32'h00000000, 32'h4b000000, 32'h00000000};
    // directed: products far below A (aligned out completely)
    vin[2] = '{32'h4b000000, 32'h3f800000, 32'h1f800000, 32'h1f800000, 32'h3f3504f3, 32'hbf3504f3};
    for (int n = 3; n < NV; n++) begin
      vin[n][0] = rand_fp(110, 140); vin[n][1] = rand_fp(110, 140);
      vin[n][2] = rand_fp(110, 140); vin[n][3] = rand_fp(110, 140);
      if (n % 3 != 2) begin
        vin[n][4] = tw_re[n % 16]; vin[n][5] = tw_im[n % 16];
      end else begin
        vin[n][4] = rand_fp(120, 130); vin[n][5] = rand_fp(120, 130);
      end
      if (n % 11 == 0) vin[n][2] = 32'h00000000;
    end
    for (int n = 0; n < NV; n++) begin
      prepare(n);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    running <= 1'b1;
    wait (out_idx == NV);
    repeat (5) @(posedge clk);
    checks++;
    if (out_idx != NV) begin
      failures++;
      $display("FAIL %0d results missing", NV - out_idx);
    end
    $display("mechanisms: align=%0d shift_out=%0d zero_operand=%0d negative=%0d cancel_to_zero=%0d round_up=%0d overflow=%0d",
             n_align, n_shift_out, n_zero_in, n_neg, n_cancel, n_round, n_inf);
    checks += 7;
    if (n_align == 0)     begin failures++; $display("FAIL no alignment shift"); end
    if (n_shift_out == 0) begin failures++; $display("FAIL no complete shift-out"); end
    if (n_zero_in == 0)   begin failures++; $display("FAIL no zero operand"); end
    if (n_neg == 0)       begin failures++; $display("FAIL no negative result"); end
    if (n_cancel == 0)    begin failures++; $display("FAIL no cancellation"); end
    if (n_round == 0)     begin failures++; $display("FAIL no rounding increment"); end
    if (n_inf == 0)       begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
