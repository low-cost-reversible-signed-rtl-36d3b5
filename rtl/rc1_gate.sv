// RC-I: 3x3 reversible comparator gate.
//
// Outputs p = a, q = a'b ^ c, r = ab' ^ c. With c tied to 0, q flags
// a < b and r flags a > b for single bits. The mapping is a bijection on
// the eight input states, so the gate loses no information; q and r can
// never both differ from c because a'b and ab' are never both 1.
// The equations are the published gate definition. Purely combinational.
module rc1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ c;
  assign r = (a & ~b) ^ c;
endmodule
