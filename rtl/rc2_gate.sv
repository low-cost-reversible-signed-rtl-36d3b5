// RC-II: 4x4 reversible comparator gate.
//
// Outputs p = a, q = a'b ^ d, r = a ^ b ^ c, s = ab' ^ d. With c = 1 and
// d = 0 it compares two bits in one gate: q = a'b, r = (a ^ b)' (equal),
// s = ab'. Which of q and s means "greater" is left to the user of the
// gate: for unsigned bits q is a < b, for two's-complement sign bits q
// is a > b. The mapping is a bijection on the sixteen input states. The
// equations are the published gate definition. Purely combinational.
module rc2_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = (~a & b) ^ d;
  assign r = a ^ b ^ c;
  assign s = (a & ~b) ^ d;
endmodule
