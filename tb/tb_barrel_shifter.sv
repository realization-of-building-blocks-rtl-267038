// Test of the barrel shifter in all four configurations (ROTATION 0/1,
// DIRECTION 0 = left / 2 = right) at its default 32 bits, at the other common
// word sizes 8, 16 and 64 bits, and at 56 bits, a width that is not a power of
// two and whose 6-bit distance can exceed it.  The default instance (32-bit
// left shift) is among them.  References use the language's shift operators
// and concatenation; the 8/16/64-bit ones come from one masked 64-bit model.
module tb_barrel_shifter;
  int checks = 0, failures = 0;

  logic [31:0] d32;
  logic [4:0]  s32;
  logic [55:0] d56;
  logic [5:0]  s56;
  logic [31:0] q32 [4];     // index {right, rotate}
  logic [55:0] q56 [4];

  barrel_shifter                                        u32_sl (.data_in(d32), .shamt(s32), .data_out(q32[0]));
  barrel_shifter #(.ROTATION(1))                        u32_rl (.data_in(d32), .shamt(s32), .data_out(q32[1]));
  barrel_shifter #(.DIRECTION(2))                       u32_sr (.data_in(d32), .shamt(s32), .data_out(q32[2]));
  barrel_shifter #(.ROTATION(1), .DIRECTION(2))         u32_rr (.data_in(d32), .shamt(s32), .data_out(q32[3]));
  barrel_shifter #(.WIDTH(56))                          u56_sl (.data_in(d56), .shamt(s56), .data_out(q56[0]));
  barrel_shifter #(.WIDTH(56), .ROTATION(1))            u56_rl (.data_in(d56), .shamt(s56), .data_out(q56[1]));
  barrel_shifter #(.WIDTH(56), .DIRECTION(2))           u56_sr (.data_in(d56), .shamt(s56), .data_out(q56[2]));
  barrel_shifter #(.WIDTH(56), .ROTATION(1), .DIRECTION(2)) u56_rr (.data_in(d56), .shamt(s56), .data_out(q56[3]));

  // 8, 16 and 64-bit instances, mode m = {right, rotate}
  logic [7:0]  d8;
  logic [2:0]  s8;
  logic [7:0]  q8 [4];
  logic [15:0] d16;
  logic [3:0]  s16;
  logic [15:0] q16 [4];
  logic [63:0] d64;
  logic [5:0]  s64;
  logic [63:0] q64 [4];

  for (genvar m = 0; m < 4; m++) begin : g_pow2
    barrel_shifter #(.WIDTH(8),  .ROTATION(m % 2), .DIRECTION((m / 2) * 2))
      u8  (.data_in(d8),  .shamt(s8),  .data_out(q8[m]));
    barrel_shifter #(.WIDTH(16), .ROTATION(m % 2), .DIRECTION((m / 2) * 2))
      u16 (.data_in(d16), .shamt(s16), .data_out(q16[m]));
    barrel_shifter #(.WIDTH(64), .ROTATION(m % 2), .DIRECTION((m / 2) * 2))
      u64 (.data_in(d64), .shamt(s64), .data_out(q64[m]));
  end

  // Reference for a power-of-two width w held in the low bits of 64.
  function automatic logic [63:0] ref_shift(logic [63:0] d, int s, int w, int m);
    logic [63:0] mask, l, r;
    mask = (w == 64) ? '1 : ((64'(1) << w) - 1);
    d    = d & mask;
    l    = (d << s) & mask;
    r    = d >> s;
    case (m)
      0: return l;
      1: return (s == 0) ? d : (l | (d >> (w - s)));
      2: return r;
      default: return (s == 0) ? d : (r | ((d << (w - s)) & mask));
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0]  r32 [4];
    logic [55:0]  r56 [4];
    logic [111:0] dd;
    int           k;
    for (int n = 0; n < 3000; n++) begin
      d32 = $urandom;
      d56 = 56'({$urandom, $urandom});
      s32 = 5'($urandom);
      s56 = 6'($urandom);
      d8  = 8'($urandom);
      s8  = 3'($urandom);
      d16 = 16'($urandom);
      s16 = 4'($urandom);
      d64 = {$urandom, $urandom};
      s64 = 6'($urandom);
      #1;
      r32[0] = d32 << s32;
      r32[2] = d32 >> s32;
      r32[1] = (d32 << s32) | (d32 >> (32 - int'(s32)));
      r32[3] = (d32 >> s32) | (d32 << (32 - int'(s32)));
      k  = int'(s56) % 56;
      dd = {d56, d56};
      r56[0] = d56 << s56;
      r56[2] = d56 >> s56;
      r56[1] = dd[111-k -: 56];
      r56[3] = dd[55+k -: 56];
      for (int m = 0; m < 4; m++) begin
        checks += 2;
        if (q32[m] !== r32[m]) begin
          failures++;
          $display("FAIL32 mode=%0d d=%h s=%0d q=%h ref=%h", m, d32, s32, q32[m], r32[m]);
        end
        if (q56[m] !== r56[m]) begin
          failures++;
          $display("FAIL56 mode=%0d d=%h s=%0d q=%h ref=%h", m, d56, s56, q56[m], r56[m]);
        end
        checks += 3;
        if (64'(q8[m]) !== ref_shift(64'(d8), int'(s8), 8, m)) begin
          failures++;
          $display("FAIL8 mode=%0d d=%h s=%0d q=%h", m, d8, s8, q8[m]);
        end
        if (64'(q16[m]) !== ref_shift(64'(d16), int'(s16), 16, m)) begin
          failures++;
          $display("FAIL16 mode=%0d d=%h s=%0d q=%h", m, d16, s16, q16[m]);
        end
        if (q64[m] !== ref_shift(d64, int'(s64), 64, m)) begin
          failures++;
          $display("FAIL64 mode=%0d d=%h s=%0d q=%h", m, d64, s64, q64[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
