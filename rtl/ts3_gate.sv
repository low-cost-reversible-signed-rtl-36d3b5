// TS-3 gate: 3x3 reversible gate with p = a, q = b, r = a ^ b ^ c
// (quantum cost 2, two CNOTs).
//
// In the comparator, a and b carry the final less and greater flags and
// c is tied to 1, so r = (a | b)' is the equal flag: the two inputs are
// never both 1. Purely combinational.
module ts3_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
endmodule
