// Most-significant-bit comparator built from a single RC-II gate.
//
// The gate gets (x, y, 1, 0) and returns q = x'y, r = (x ^ y)' and
// s = xy'. For two's-complement operands (SIGNED = 1, the default and
// the proposed design) the operand whose sign bit is 0 is the larger one,
// so q = x'y is "x > y" and s = xy' is "x < y". With SIGNED = 0 the same
// gate compares unsigned top bits and the roles of q and s swap. Only
// this choice of which gate output feeds which flag differs between the
// two modes; the gate itself is the same.
//
// The result is the start of the comparison chain: exactly one of
// lt/gt/eq is set. The gate's p output (= x) is the one garbage output.
// Costs: 1 gate, quantum cost 5, 2 constant inputs, 1 garbage output.
// Purely combinational.
module sign_bit_comparator
  import rev_cmp_pkg::*;
#(
  parameter bit SIGNED = 1'b1
) (
  input  logic        x,
  input  logic        y,
  output cmp_result_t res,
  output logic        garbage
);
  logic q_xl_y, r_eq, s_x_gl;

  rc2_gate u_rc2 (
    .a(x),
    .b(y),
    .c(1'b1),
    .d(1'b0),
    .p(garbage),
    .q(q_xl_y),
    .r(r_eq),
    .s(s_x_gl)
  );

  assign res.eq = r_eq;
  assign res.gt = SIGNED ? q_xl_y : s_x_gl;
  assign res.lt = SIGNED ? s_x_gl : q_xl_y;
endmodule
