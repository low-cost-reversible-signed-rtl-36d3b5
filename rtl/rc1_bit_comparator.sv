// One-bit magnitude comparator built from a single RC-I gate.
//
// The gate's third input is the constant 0, so q = x'y flags x < y and
// r = xy' flags x > y; neither flag set means the bits are equal (this
// circuit has no equal output of its own). The gate's p output (a copy
// of x) is the one garbage output and is brought out so that the full
// reversible mapping stays visible. Costs: 1 gate, quantum cost 4,
// 1 constant input, 1 garbage output. Purely combinational.
module rc1_bit_comparator (
  input  logic x,
  input  logic y,
  output logic lt,       // x < y
  output logic gt,       // x > y
  output logic garbage   // RC-I p output (= x)
);
  rc1_gate u_rc1 (
    .a(x),
    .b(y),
    .c(1'b0),
    .p(garbage),
    .q(lt),
    .r(gt)
  );
endmodule
