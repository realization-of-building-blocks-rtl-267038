// Barrel shifter: logical shift or rotate of a WIDTH-bit word by 0..2^SHW-1
// places in one combinational pass.
//
// Three stages, as in the published block diagram: an input reversal, a
// left shift/rotate core, and an output reversal.  For a right operation both
// reversals are active (reverse, shift left, reverse back = shift right), so
// the core only ever moves data one way.  The core is a cascade of SHW rows of
// WIDTH 2:1 multiplexers, row s moving the word by 2^s places when bit s of
// shamt ("select") is set: WIDTH * log2(WIDTH) multiplexers in all (160 for
// 32 bits).  In a shift the vacated positions fill with zeros; in a rotation
// the bits that leave one end re-enter at the other.
//
// As in the published component, the operation is fixed by parameters:
//   ROTATION  0 = logical shift, 1 = rotate
//   DIRECTION 0 = left, 2 = right (any non-zero value is taken as right)
// The defaults (32 bits, shift, left) are this design's choice.  A shift by
// WIDTH or more places gives zero; a rotation by WIDTH or more places rotates
// by the distance modulo WIDTH.  Combinational.
module barrel_shifter #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned SHW       = $clog2(WIDTH),
  parameter int unsigned ROTATION  = 0,
  parameter int unsigned DIRECTION = 0
) (
  input  logic [WIDTH-1:0] data_in,
  input  logic [SHW-1:0]   shamt,
  output logic [WIDTH-1:0] data_out
);
  localparam bit RIGHT = (DIRECTION != 0);
  localparam bit ROT   = (ROTATION != 0);

  logic [WIDTH-1:0] rev_in, core_out;
  logic [WIDTH-1:0] stage [SHW+1];

  function automatic logic [WIDTH-1:0] reverse(input logic [WIDTH-1:0] v);
    for (int i = 0; i < WIDTH; i++) reverse[i] = v[WIDTH-1-i];
  endfunction

  // one row of multiplexers: move left by 'amt' places, shifting or rotating
  function automatic logic [WIDTH-1:0] row(input logic [WIDTH-1:0] v,
                                           input int unsigned amt);
    for (int i = 0; i < WIDTH; i++) begin
      if (amt < WIDTH && i >= int'(amt))
        row[i] = v[i - int'(amt)];
      else if (ROT)
        row[i] = v[(i + WIDTH - (amt % WIDTH)) % WIDTH];
      else
        row[i] = 1'b0;
    end
  endfunction

  always_comb begin
    rev_in   = RIGHT ? reverse(data_in) : data_in;
    stage[0] = rev_in;
    for (int s = 0; s < int'(SHW); s++)
      stage[s+1] = shamt[s] ? row(stage[s], 1 << s) : stage[s];
    core_out = stage[SHW];
    data_out = RIGHT ? reverse(core_out) : core_out;
  end
endmodule
