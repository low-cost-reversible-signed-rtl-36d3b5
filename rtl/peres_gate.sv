// Peres gate (PG): 3x3 reversible gate with p = a, q = a ^ b,
// r = ab ^ c (quantum cost 4).
//
// In the comparator it merges one bit's result into the running result:
// with a = "equal so far", b = this bit's less (or greater) flag and
// c = "less (or greater) so far", r becomes the updated flag, because the
// "equal so far" and "less so far" flags are never both set, so the XOR
// acts as an OR. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
