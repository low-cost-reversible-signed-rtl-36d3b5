// Full-size testbench: the comparator at its default width (64 bits,
// signed), with no parameter overrides.
//
// Checks the garbage port width against the published 64-bit garbage
// count (253), then applies directed corner cases (most negative against
// most positive, -1 against 0, pairs that differ only in the least
// significant bit, equal operands) and 20000 random pairs, half of them
// sharing a random number of leading bits so that the decision point
// moves along the whole chain. Results are compared with $signed integer
// comparison; the garbage vector with a model of the gate outputs.
module tb_rev_signed_comparator_full;
  import rev_cmp_pkg::*;
  localparam int N = 64;

  logic [N-1:0]   x, y;
  logic           lt, gt, eq;
  logic [4*N-4:0] garbage;
  int checks = 0, failures = 0;
  int n_msb = 0, n_low = 0, n_eq = 0, deepest = 0;

  rev_signed_comparator dut (.x(x), .y(y), .lt(lt), .gt(gt), .eq(eq), .garbage(garbage));

  function automatic logic [4*N-4:0] garbage_model(logic [N-1:0] xv, logic [N-1:0] yv);
    logic [4*N-4:0] g;
    logic eq_hi;
    g[0]  = xv[N-1];
    eq_hi = xv[N-1] == yv[N-1];
    for (int k = 1; k < N; k++) begin
      logic xb, yb;
      xb = xv[N-1-k];
      yb = yv[N-1-k];
      g[4*k-3] = xb;
      g[4*k-2] = eq_hi ^ (!xb && yb);
      g[4*k-1] = eq_hi;
      g[4*k]   = eq_hi ^ (xb && !yb);
      eq_hi    = eq_hi && (xb == yb);
    end
    return g;
  endfunction

  task automatic apply(logic [N-1:0] xv, logic [N-1:0] yv);
    logic [2:0] exp_lge;
    x = xv;
    y = yv;
    #1;
    exp_lge = {$signed(xv) < $signed(yv), $signed(xv) > $signed(yv), xv == yv};
    checks++;
    if ({lt, gt, eq} !== exp_lge) begin
      failures++;
      $display("FAIL x=%h y=%h got lt/gt/eq=%b%b%b exp=%b", xv, yv, lt, gt, eq, exp_lge);
    end
    checks++;
    if (garbage !== garbage_model(xv, yv)) begin
      failures++;
      $display("FAIL garbage x=%h y=%h", xv, yv);
    end
    if (xv[N-1] != yv[N-1]) n_msb++;
    else if (xv != yv) begin
      n_low++;
      // stage index at which the decision fell
      for (int b = N - 1; b >= 0; b--)
        if (xv[b] != yv[b]) begin
          if (N - 1 - b > deepest) deepest = N - 1 - b;
          break;
        end
    end
    else n_eq++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($bits(garbage) != 253 || cmp_garbage_count(N) != 253) begin
      failures++;
      $display("FAIL garbage width %0d, expected 253", $bits(garbage));
    end
    apply({1'b1, {(N-1){1'b0}}}, {1'b0, {(N-1){1'b1}}});  // min < max
    apply({1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}});  // max > min
    apply('1, '0);                                        // -1 < 0
    apply('0, '1);                                        // 0 > -1
    apply(64'h0123_4567_89ab_cdee, 64'h0123_4567_89ab_cdef);  // lsb only
    apply(64'hfedc_ba98_7654_3211, 64'hfedc_ba98_7654_3210);  // lsb only, negative
    apply(64'h8000_0000_0000_0001, 64'h8000_0000_0000_0001);  // equal
    for (int i = 0; i < 20000; i++) begin
      logic [N-1:0] xv, yv;
      xv = {$urandom, $urandom};
      yv = {$urandom, $urandom};
      if (i % 2 == 1) begin
        int shared;
        shared = int'($urandom_range(N, 0));
        for (int b = 0; b < N; b++)
          if (b >= N - shared) yv[b] = xv[b];
      end
      apply(xv, yv);
    end
    $display("decided at sign bit %0d, at a lower bit %0d (deepest stage %0d), equal %0d",
             n_msb, n_low, deepest, n_eq);
    checks++;
    if (n_msb == 0 || n_low == 0 || n_eq == 0 || deepest != N - 1) begin
      failures++;
      $display("FAIL a decision depth was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
