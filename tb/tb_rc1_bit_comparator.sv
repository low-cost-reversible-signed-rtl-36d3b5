// Self-checking testbench for the one-bit RC-I comparator.
//
// Applies the four bit pairs and checks lt against x < y, gt against
// x > y (integer comparison done here) and the garbage output against x.
module tb_rc1_bit_comparator;
  logic x, y, lt, gt, garbage;
  int checks = 0, failures = 0;

  rc1_bit_comparator dut (.x(x), .y(y), .lt(lt), .gt(gt), .garbage(garbage));

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
      checks++;
      if (lt !== (int'(x) < int'(y)) || gt !== (int'(x) > int'(y)) || garbage !== x) begin
        failures++;
        $display("FAIL x=%b y=%b lt=%b gt=%b garbage=%b", x, y, lt, gt, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
