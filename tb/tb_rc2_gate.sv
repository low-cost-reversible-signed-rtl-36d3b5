// Exhaustive self-checking testbench for the RC-II gate (rc2_gate).
//
// Applies all sixteen input states, compares each output with the gate's
// defining equations (p = a, q = a'b ^ d, r = a ^ b ^ c, s = ab' ^ d)
// evaluated here, and checks that the sixteen output states are all
// different, i.e. that the gate is reversible.
module tb_rc2_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  rc2_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_o;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      exp_o = {a, (!a && b) != d, (a != b) != c, (a && !b) != d};
      checks++;
      if ({p, q, r, s} !== exp_o) begin
        failures++;
        $display("FAIL in=%b got pqrs=%b exp=%b", {a, b, c, d}, {p, q, r, s}, exp_o);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output state %b reached twice: not reversible", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
