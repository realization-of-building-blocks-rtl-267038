// One-bit full adder: the cell the BSD adder slice is built from (four per
// two-digit slice, as in the published slice).
// sum = a ^ b ^ ci, co = majority(a, b, ci).  Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
