// Self-checking testbench for the RC-II sign-bit comparator.
//
// Two instances: SIGNED = 1 treats the bits as two's-complement sign bits
// (a set bit is the smaller operand, values 0 and -1), SIGNED = 0 as
// unsigned bits. All four bit pairs are applied to both and each result
// is compared with an integer comparison of the values they stand for.
module tb_sign_bit_comparator;
  import rev_cmp_pkg::*;
  logic x, y;
  cmp_result_t res_s, res_u;
  logic garb_s, garb_u;
  int checks = 0, failures = 0;

  sign_bit_comparator #(.SIGNED(1'b1)) dut_s (.x(x), .y(y), .res(res_s), .garbage(garb_s));
  sign_bit_comparator #(.SIGNED(1'b0)) dut_u (.x(x), .y(y), .res(res_u), .garbage(garb_u));

  task automatic check(string mode, cmp_result_t got, int xv, int yv, logic g);
    cmp_result_t exp_r;
    exp_r.lt = xv < yv;
    exp_r.gt = xv > yv;
    exp_r.eq = xv == yv;
    checks++;
    if (got !== exp_r || g !== x) begin
      failures++;
      $display("FAIL %s x=%b y=%b got lt/gt/eq=%b exp=%b", mode, x, y, got, exp_r);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      check("signed",   res_s, x ? -1 : 0, y ? -1 : 0, garb_s);
      check("unsigned", res_u, int'(x),    int'(y),    garb_u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
