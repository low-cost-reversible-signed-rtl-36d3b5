// Reversible n-bit signed comparator (top level).
//
// Compares two N-bit two's-complement numbers x and y and raises exactly
// one of lt (x < y), gt (x > y) and eq (x == y). The circuit is a ripple
// chain, most significant bit first: a sign-bit stage (one RC-II gate)
// compares x[N-1] and y[N-1], then N-1 single-bit modules (RC-I, two
// Peres gates, TS-3 each) fold in x[N-2] down to x[0]. A lower bit can
// only change the result while all higher bits are equal. Every gate is
// a reversible (bijective) gate; the outputs that carry no result are
// the garbage outputs and are brought out on the garbage port, so the
// whole mapping from (x, y) to (result, garbage) is one-to-one.
//
// Cost for N bits: 4N-3 gates, 4N-3 garbage outputs, 2N constant inputs,
// quantum cost 14N-9 (29/29/16/103 for N = 8, 253/253/128/887 for
// N = 64). The functions in rev_cmp_pkg give the same numbers.
//
// Parameters: N (default 64, the widest configuration worked out in
// full; any N >= 1 works, N = 1 leaves only the sign-bit stage) and
// SIGNED (default 1). SIGNED = 0 swaps the roles of the sign stage's two
// flag outputs and turns the circuit into an unsigned comparator.
//
// Garbage layout (this design's choice): garbage[0] is the sign stage's,
// and stage k (bit N-1-k, k = 1..N-1) owns garbage[4k-3 +: 4], lowest
// bit first: RC-I p, Peres-lt q, Peres-gt p, Peres-gt q.
//
// Timing: purely combinational, no clock; the critical path runs through
// all N stages (per stage, a Peres gate's AND/XOR and the TS-3 XOR).
module rev_signed_comparator
  import rev_cmp_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           lt,
  output logic           gt,
  output logic           eq,
  output logic [4*N-4:0] garbage
);
  // chain[k] is the result after stage k; stage 0 is the sign bit.
  cmp_result_t chain [N];

  sign_bit_comparator #(.SIGNED(SIGNED)) u_sign (
    .x      (x[N-1]),
    .y      (y[N-1]),
    .res    (chain[0]),
    .garbage(garbage[0])
  );

  for (genvar k = 1; k < N; k++) begin : g_stage
    single_bit_rc_module u_bit (
      .x      (x[N-1-k]),
      .y      (y[N-1-k]),
      .res_in (chain[k-1]),
      .res_out(chain[k]),
      .garbage(garbage[4*k-3 +: 4])
    );
  end

  assign lt = chain[N-1].lt;
  assign gt = chain[N-1].gt;
  assign eq = chain[N-1].eq;

  // The chain must always carry exactly one flag.
  always_comb begin
    assert final ($onehot({lt, gt, eq}))
      else $error("comparator result is not one-hot: lt=%b gt=%b eq=%b", lt, gt, eq);
  end
endmodule
