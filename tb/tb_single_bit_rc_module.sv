// Self-checking testbench for one stage of the comparator chain.
//
// Applies every bit pair with each of the three legal incoming results
// (less, greater, equal so far). Expected: an incoming less or greater
// passes through unchanged; an incoming equal is replaced by this bit's
// comparison. The four garbage bits are checked against their gate
// equations (x, eq_in ^ x'y, eq_in, eq_in ^ xy'), and the twelve
// (result, garbage) states must all differ: the stage loses nothing.
module tb_single_bit_rc_module;
  import rev_cmp_pkg::*;
  logic x, y;
  cmp_result_t res_in, res_out, exp_r;
  logic [3:0] garbage, exp_g;
  int checks = 0, failures = 0;
  bit seen [128];

  single_bit_rc_module dut (.x(x), .y(y), .res_in(res_in), .res_out(res_out), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int s = 0; s < 3; s++) begin
      for (int v = 0; v < 4; v++) begin
        {x, y} = 2'(v);
        res_in = '{lt: s == 0, gt: s == 1, eq: s == 2};
        #1;
        if (s == 2) exp_r = '{lt: !x && y, gt: x && !y, eq: x == y};
        else        exp_r = res_in;
        exp_g = {res_in.eq != (x && !y), res_in.eq, res_in.eq != (!x && y), x};
        checks++;
        if (res_out !== exp_r) begin
          failures++;
          $display("FAIL in=%b x=%b y=%b got=%b exp=%b", res_in, x, y, res_out, exp_r);
        end
        checks++;
        if (garbage !== exp_g) begin
          failures++;
          $display("FAIL garbage in=%b x=%b y=%b got=%b exp=%b", res_in, x, y, garbage, exp_g);
        end
        checks++;
        if (seen[{res_out, garbage}]) begin
          failures++;
          $display("FAIL output state %b repeated", {res_out, garbage});
        end
        seen[{res_out, garbage}] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
