// Exhaustive test of the two-digit BSD adder slice: all 2^10 combinations of
// the eight digit wires and the two incoming transfers, checked against the
// arithmetic identity X + Y + c_in - cn_in = S + 4 (c_out - cn_out).
// A second check confirms the carry-limited property: c_out does not depend
// on the incoming transfers.
module tb_bsd_adder_slice;
  logic [1:0] x_pos, x_neg, y_pos, y_neg, s_pos, s_neg;
  logic       c_in, cn_in, c_out, cn_out;
  int checks = 0, failures = 0;

  bsd_adder_slice dut (.*);

  function automatic int val2(input logic [1:0] p, input logic [1:0] n);
    return int'(p[0]) - int'(n[0]) + 2 * (int'(p[1]) - int'(n[1]));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c_ref;
    for (int v = 0; v < 1024; v++) begin
      {x_pos, x_neg, y_pos, y_neg} = 8'(v);
      {c_in, cn_in} = 2'(v >> 8);
      #1;
      checks++;
      if (val2(x_pos, x_neg) + val2(y_pos, y_neg) + int'(c_in) - int'(cn_in)
          != val2(s_pos, s_neg) + 4 * (int'(c_out) - int'(cn_out))) begin
        failures++;
        $display("FAIL x=%b/%b y=%b/%b c=%b%b -> s=%b/%b co=%b%b",
                 x_pos, x_neg, y_pos, y_neg, c_in, cn_in, s_pos, s_neg, c_out, cn_out);
      end
      // carry-limited: c_out unchanged when the incoming transfers change
      c_ref = c_out;
      {c_in, cn_in} = ~{c_in, cn_in};
      #1;
      checks++;
      if (c_out != c_ref) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
