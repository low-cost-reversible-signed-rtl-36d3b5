// Shared types and cost constants for the reversible n-bit comparator.
//
// cmp_result_t is the three-wire comparison result (less, greater, equal)
// that runs from the sign-bit stage through the chain of single-bit
// modules. Exactly one of its bits is set for any pair of operands.
//
// The cost constants give, per reversible gate and per building block,
// the quantum cost (QC), gate count (GA), garbage outputs (GB) and
// constant inputs (CI). The per-gate quantum costs (RC-I 4, RC-II 5,
// Peres 4, TS-3 2) are those of the gates' published quantum
// realisations; the functions add them up for an n-bit chain of one
// sign-bit stage and n-1 single-bit modules. They are pure constants:
// nothing here becomes hardware.
package rev_cmp_pkg;

  typedef struct packed {
    logic lt;  // x < y
    logic gt;  // x > y
    logic eq;  // x == y
  } cmp_result_t;

  // Quantum cost of each reversible gate used.
  localparam int unsigned QC_RC1  = 4;
  localparam int unsigned QC_RC2  = 5;
  localparam int unsigned QC_PG   = 4;
  localparam int unsigned QC_TS3  = 2;

  // Sign-bit stage: one RC-II gate, inputs c=1 and d=0, output p unused.
  localparam int unsigned SIGN_GA = 1;
  localparam int unsigned SIGN_GB = 1;
  localparam int unsigned SIGN_CI = 2;
  localparam int unsigned SIGN_QC = QC_RC2;

  // Single-bit module: RC-I, two Peres gates, TS-3.
  localparam int unsigned MOD_GA  = 4;
  localparam int unsigned MOD_GB  = 4;
  localparam int unsigned MOD_CI  = 2;
  localparam int unsigned MOD_QC  = QC_RC1 + 2 * QC_PG + QC_TS3;

  function automatic int unsigned cmp_gate_count(int unsigned n);
    return SIGN_GA + (n - 1) * MOD_GA;
  endfunction

  function automatic int unsigned cmp_garbage_count(int unsigned n);
    return SIGN_GB + (n - 1) * MOD_GB;
  endfunction

  function automatic int unsigned cmp_constant_inputs(int unsigned n);
    return SIGN_CI + (n - 1) * MOD_CI;
  endfunction

  function automatic int unsigned cmp_quantum_cost(int unsigned n);
    return SIGN_QC + (n - 1) * MOD_QC;
  endfunction

endpackage
