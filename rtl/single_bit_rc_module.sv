// Single-bit comparator module: one stage of the comparison chain.
//
// It takes one bit of each operand and the result of comparing all the
// more significant bits (exactly one of lt/gt/eq set) and returns the
// result including this bit:
//   lt_out = lt_in | (eq_in & x'y)
//   gt_out = gt_in | (eq_in & xy')
//   eq_out = (lt_out | gt_out)'
// It is built from four reversible gates:
//   * RC-I (x, y, 0): this bit's less flag x'y and greater flag xy';
//   * Peres (eq_in, x'y, lt_in): r = eq_in & x'y ^ lt_in = lt_out (the
//     XOR is an OR since lt_in and eq_in are never both set); its p
//     output passes eq_in on to
//   * Peres (eq_in, xy', gt_in): r = gt_out;
//   * TS-3 (lt_out, gt_out, 1): p = lt_out, q = gt_out,
//     r = lt_out ^ gt_out ^ 1 = eq_out.
// The gate types and the roles of their outputs follow the published
// module; that eq_in reaches the second Peres gate through the first
// one's p output is this design's reading of the drawing. Four outputs
// are garbage: RC-I p, the first Peres gate's q, the second's p and q.
// Costs: 4 gates, quantum cost 14, 2 constant inputs, 4 garbage outputs.
// Purely combinational.
module single_bit_rc_module
  import rev_cmp_pkg::*;
(
  input  logic        x,
  input  logic        y,
  input  cmp_result_t res_in,   // comparison of the higher-order bits
  output cmp_result_t res_out,  // comparison including this bit
  output logic [3:0]  garbage
);
  logic bit_lt, bit_gt;
  logic eq_pass;
  logic lt_new, gt_new;

  rc1_bit_comparator u_bit (
    .x      (x),
    .y      (y),
    .lt     (bit_lt),
    .gt     (bit_gt),
    .garbage(garbage[0])
  );

  peres_gate u_pg_lt (
    .a(res_in.eq),
    .b(bit_lt),
    .c(res_in.lt),
    .p(eq_pass),
    .q(garbage[1]),
    .r(lt_new)
  );

  peres_gate u_pg_gt (
    .a(eq_pass),
    .b(bit_gt),
    .c(res_in.gt),
    .p(garbage[2]),
    .q(garbage[3]),
    .r(gt_new)
  );

  ts3_gate u_ts3 (
    .a(lt_new),
    .b(gt_new),
    .c(1'b1),
    .p(res_out.lt),
    .q(res_out.gt),
    .r(res_out.eq)
  );
endmodule
