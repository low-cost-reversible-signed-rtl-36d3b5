// Test helper: drives one rev_signed_comparator of width N and checks it.
//
// With EXHAUSTIVE set it applies every (x, y) pair and also checks that
// no two pairs give the same (lt, gt, eq, garbage) vector, i.e. that the
// circuit with its constant inputs is one-to-one. Otherwise it applies
// NRAND random pairs, half of them built so that x and y share a random
// number of leading bits (so that the decision falls at every depth).
// Expected results come from a plain integer comparison ($signed when
// SIGNED is set); expected garbage bits come from a model of which value
// each unused gate output carries. Counters report how often the result
// was decided at the sign bit, at a lower bit, or not at all (equal), and
// how often the signed and unsigned readings of the same pair differ.
module cmp_sweep #(
  parameter int unsigned N          = 4,
  parameter bit          SIGNED     = 1'b1,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 1000
) (
  output int checks,
  output int failures,
  output int n_msb_decided,
  output int n_low_decided,
  output int n_equal,
  output int n_mode_differs,
  output bit done
);
  logic [N-1:0]   x, y;
  logic           lt, gt, eq;
  logic [4*N-4:0] garbage;
  bit             seen [logic [4*N-1:0]];

  rev_signed_comparator #(.N(N), .SIGNED(SIGNED)) dut (
    .x(x), .y(y), .lt(lt), .gt(gt), .eq(eq), .garbage(garbage)
  );

  // Value of each garbage output, worked out from the gate equations.
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
    logic el, eg, ee, sl, sg, ul, ug;
    x = xv;
    y = yv;
    #1;
    el = SIGNED ? ($signed(xv) < $signed(yv)) : (xv < yv);
    eg = SIGNED ? ($signed(xv) > $signed(yv)) : (xv > yv);
    ee = xv == yv;
    sl = $signed(xv) < $signed(yv);
    sg = $signed(xv) > $signed(yv);
    ul = xv < yv;
    ug = xv > yv;
    checks++;
    if ({lt, gt, eq} !== {el, eg, ee}) begin
      failures++;
      $display("FAIL N=%0d SIGNED=%0d x=%h y=%h got lt/gt/eq=%b%b%b exp=%b%b%b",
               N, SIGNED, xv, yv, lt, gt, eq, el, eg, ee);
    end
    checks++;
    if (garbage !== garbage_model(xv, yv)) begin
      failures++;
      $display("FAIL N=%0d garbage x=%h y=%h got=%h exp=%h", N, xv, yv, garbage, garbage_model(xv, yv));
    end
    if (xv[N-1] != yv[N-1]) n_msb_decided++;
    else if (!ee)           n_low_decided++;
    else                    n_equal++;
    if ({ul, ug} != {sl, sg}) n_mode_differs++;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    n_msb_decided = 0;
    n_low_decided = 0;
    n_equal = 0;
    n_mode_differs = 0;
    done = 1'b0;
    if (EXHAUSTIVE) begin
      for (longint unsigned v = 0; v < (64'd1 << (2 * N)); v++) begin
        logic [2*N-1:0] xy;
        logic [4*N-1:0] key;
        xy = (2*N)'(v);
        apply(xy[2*N-1:N], xy[N-1:0]);
        key = {lt, gt, eq, garbage};
        checks++;
        if (seen.exists(key)) begin
          failures++;
          $display("FAIL N=%0d output vector %h repeated: mapping not one-to-one", N, key);
        end
        seen[key] = 1'b1;
      end
    end else begin
      for (int i = 0; i < NRAND; i++) begin
        logic [N-1:0] xv, yv;
        for (int b = 0; b < N; b++) begin
          xv[b] = 1'($urandom);
          yv[b] = 1'($urandom);
        end
        if (i % 2 == 1) begin
          // share a random number of leading bits, then differ (or not)
          int shared;
          shared = int'($urandom_range(N, 0));
          for (int b = 0; b < N; b++)
            if (b >= N - shared) yv[b] = xv[b];
        end
        apply(xv, yv);
      end
    end
    done = 1'b1;
  end
endmodule
