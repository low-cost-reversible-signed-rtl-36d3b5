// Exhaustive self-checking testbench for the Peres gate (peres_gate).
//
// Applies all eight input states, compares each output with the gate's
// defining equations (p = a, q = a ^ b, r = ab ^ c) evaluated here, and checks that the
// eight output states are all different, i.e. that the gate is
// reversible. Purely combinational; a watchdog ends a hung run.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq_, er;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq_ = a != b;
      er = (a && b) != c;
      checks++;
      if ({p, q, r} !== {ep, eq_, er}) begin
        failures++;
        $display("FAIL in=%b%b%b got pqr=%b%b%b exp=%b%b%b", a, b, c, p, q, r, ep, eq_, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output state %b reached twice: not reversible", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
