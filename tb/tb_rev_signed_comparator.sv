// End-to-end testbench for the reversible n-bit comparator.
//
// Runs cmp_sweep on every width from 1 to 5 bits and on 8 bits, in both
// modes, exhaustively (result, garbage and one-to-one mapping), on 16
// bits with random operands, and replays operand pairs read off published
// logic-simulator waveforms of 1- to 4-bit comparators; those
// waveforms show the unsigned reading, so they go to SIGNED = 0
// instances. It also checks the cost formulas against the published 8-
// and 64-bit figures. Each mechanism must occur at least once: a result
// decided at the sign bit, one decided at a lower bit, an all-equal
// result, and a pair whose signed and unsigned readings differ.
module tb_rev_signed_comparator;
  import rev_cmp_pkg::*;

  localparam int NS = 14;
  int  c_checks [NS], c_fail [NS], c_msb [NS], c_low [NS], c_eq [NS], c_mode [NS];
  bit  c_done [NS];
  int  checks = 0, failures = 0;
  int  msb = 0, low = 0, eqn = 0, mode = 0;

  for (genvar w = 1; w <= 5; w++) begin : g_exh
    cmp_sweep #(.N(w), .SIGNED(1'b1), .EXHAUSTIVE(1'b1)) u_s (
      .checks(c_checks[2*w-2]), .failures(c_fail[2*w-2]), .n_msb_decided(c_msb[2*w-2]),
      .n_low_decided(c_low[2*w-2]), .n_equal(c_eq[2*w-2]), .n_mode_differs(c_mode[2*w-2]),
      .done(c_done[2*w-2]));
    cmp_sweep #(.N(w), .SIGNED(1'b0), .EXHAUSTIVE(1'b1)) u_u (
      .checks(c_checks[2*w-1]), .failures(c_fail[2*w-1]), .n_msb_decided(c_msb[2*w-1]),
      .n_low_decided(c_low[2*w-1]), .n_equal(c_eq[2*w-1]), .n_mode_differs(c_mode[2*w-1]),
      .done(c_done[2*w-1]));
  end
  cmp_sweep #(.N(8), .SIGNED(1'b1), .EXHAUSTIVE(1'b1)) u_r8s (
    .checks(c_checks[10]), .failures(c_fail[10]), .n_msb_decided(c_msb[10]),
    .n_low_decided(c_low[10]), .n_equal(c_eq[10]), .n_mode_differs(c_mode[10]), .done(c_done[10]));
  cmp_sweep #(.N(8), .SIGNED(1'b0), .EXHAUSTIVE(1'b1)) u_r8u (
    .checks(c_checks[11]), .failures(c_fail[11]), .n_msb_decided(c_msb[11]),
    .n_low_decided(c_low[11]), .n_equal(c_eq[11]), .n_mode_differs(c_mode[11]), .done(c_done[11]));
  cmp_sweep #(.N(16), .SIGNED(1'b1), .EXHAUSTIVE(1'b0), .NRAND(4000)) u_r16s (
    .checks(c_checks[12]), .failures(c_fail[12]), .n_msb_decided(c_msb[12]),
    .n_low_decided(c_low[12]), .n_equal(c_eq[12]), .n_mode_differs(c_mode[12]), .done(c_done[12]));
  cmp_sweep #(.N(16), .SIGNED(1'b0), .EXHAUSTIVE(1'b0), .NRAND(4000)) u_r16u (
    .checks(c_checks[13]), .failures(c_fail[13]), .n_msb_decided(c_msb[13]),
    .n_low_decided(c_low[13]), .n_equal(c_eq[13]), .n_mode_differs(c_mode[13]), .done(c_done[13]));

  // Instances for the published waveform points (unsigned reading).
  logic       w1x, w1y, w1l, w1g, w1e;
  logic [0:0] w1gb;
  logic [1:0] w2x, w2y;
  logic       w2l, w2g, w2e;
  logic [4:0] w2gb;
  logic [2:0] w3x, w3y;
  logic       w3l, w3g, w3e;
  logic [8:0] w3gb;
  rev_signed_comparator #(.N(1), .SIGNED(1'b0)) u_w1 (
    .x(w1x), .y(w1y), .lt(w1l), .gt(w1g), .eq(w1e), .garbage(w1gb));
  rev_signed_comparator #(.N(2), .SIGNED(1'b0)) u_w2 (
    .x(w2x), .y(w2y), .lt(w2l), .gt(w2g), .eq(w2e), .garbage(w2gb));
  logic [3:0] w4x, w4y;
  logic       w4l, w4g, w4e;
  logic [12:0] w4gb;
  rev_signed_comparator #(.N(4), .SIGNED(1'b0)) u_w4 (
    .x(w4x), .y(w4y), .lt(w4l), .gt(w4g), .eq(w4e), .garbage(w4gb));
  rev_signed_comparator #(.N(3), .SIGNED(1'b0)) u_w3 (
    .x(w3x), .y(w3y), .lt(w3l), .gt(w3g), .eq(w3e), .garbage(w3gb));

  task automatic expect_flags(string what, logic l, logic g, logic e, logic [2:0] exp_lge);
    checks++;
    if ({l, g, e} !== exp_lge) begin
      failures++;
      $display("FAIL %s: got lt/gt/eq=%b%b%b exp=%b", what, l, g, e, exp_lge);
    end
  endtask

  task automatic expect_int(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Cost formulas against the published 2-, 8- and 64-bit figures.
    expect_int("GA n=2",  int'(cmp_gate_count(2)),      5);
    expect_int("GB n=2",  int'(cmp_garbage_count(2)),   5);
    expect_int("CI n=2",  int'(cmp_constant_inputs(2)), 4);
    expect_int("QC n=2",  int'(cmp_quantum_cost(2)),    19);
    expect_int("GA n=8",  int'(cmp_gate_count(8)),      29);
    expect_int("GB n=8",  int'(cmp_garbage_count(8)),   29);
    expect_int("CI n=8",  int'(cmp_constant_inputs(8)), 16);
    expect_int("QC n=8",  int'(cmp_quantum_cost(8)),    103);
    expect_int("GA n=64", int'(cmp_gate_count(64)),      253);
    expect_int("GB n=64", int'(cmp_garbage_count(64)),   253);
    expect_int("CI n=64", int'(cmp_constant_inputs(64)), 128);
    expect_int("QC n=64", int'(cmp_quantum_cost(64)),    887);
    expect_int("garbage port width n=2", $bits(w2gb), 5);
    expect_int("garbage port width n=3", $bits(w3gb), 9);

    // 1-bit waveform: 00 equal, 01 less, 10 greater, 11 equal.
    w1x = 0; w1y = 0; #1 expect_flags("1-bit A=0 B=0", w1l, w1g, w1e, 3'b001);
    w1x = 0; w1y = 1; #1 expect_flags("1-bit A=0 B=1", w1l, w1g, w1e, 3'b100);
    w1x = 1; w1y = 0; #1 expect_flags("1-bit A=1 B=0", w1l, w1g, w1e, 3'b010);
    w1x = 1; w1y = 1; #1 expect_flags("1-bit A=1 B=1", w1l, w1g, w1e, 3'b001);
    // 2-bit waveform, first points: A=00 against B=00, 01, 10; A=10 against B=00.
    w2x = 2'b00; w2y = 2'b00; #1 expect_flags("2-bit A=00 B=00", w2l, w2g, w2e, 3'b001);
    w2x = 2'b00; w2y = 2'b01; #1 expect_flags("2-bit A=00 B=01", w2l, w2g, w2e, 3'b100);
    w2x = 2'b00; w2y = 2'b10; #1 expect_flags("2-bit A=00 B=10", w2l, w2g, w2e, 3'b100);
    w2x = 2'b10; w2y = 2'b00; #1 expect_flags("2-bit A=10 B=00", w2l, w2g, w2e, 3'b010);
    // 3-bit waveform, first point: A=011, B=101 gives less.
    w3x = 3'b011; w3y = 3'b101; #1 expect_flags("3-bit A=011 B=101", w3l, w3g, w3e, 3'b100);
    // 4-bit waveform: top bit 0 against top bit 1 gives less, and the
    // other way round greater.
    w4x = 4'b0100; w4y = 4'b1000; #1 expect_flags("4-bit A=0100 B=1000", w4l, w4g, w4e, 3'b100);
    w4x = 4'b1000; w4y = 4'b0100; #1 expect_flags("4-bit A=1000 B=0100", w4l, w4g, w4e, 3'b010);
    expect_int("garbage port width n=4", $bits(w4gb), 13);
    expect_int("4-bit sign-stage garbage (= x[3])", int'(w4gb[0]), 1);
    // Garbage of the last points: 1-bit keeps x; 2-bit A=10 B=00 keeps
    // x1=1, then RC-I p = x0 = 0, Peres-lt q = 0, Peres-gt p = 0, q = 0.
    expect_int("1-bit garbage", int'(w1gb), 1);
    expect_int("2-bit garbage", int'(w2gb), 1);
    // 3-bit A=011 B=101: sign stage x2=0; bit 1: x1=1, eq_in=0, so
    // garbage[4:1] = {xy'=1, 0, 0, x1=1}; bit 0: x0=y0=1, eq_in=0, so
    // garbage[8:5] = {0, 0, 0, x0=1}.
    expect_int("3-bit garbage", int'(w3gb), 50);

    for (int i = 0; i < NS; i++) wait (c_done[i]);
    for (int i = 0; i < NS; i++) begin
      checks   += c_checks[i];
      failures += c_fail[i];
      msb  += c_msb[i];
      low  += c_low[i];
      eqn  += c_eq[i];
      mode += c_mode[i];
    end
    $display("mechanisms: decided at sign bit %0d, decided at a lower bit %0d, all equal %0d, signed/unsigned readings differ %0d",
             msb, low, eqn, mode);
    checks += 4;
    if (msb == 0)  begin failures++; $display("FAIL no result decided at the sign bit"); end
    if (low == 0)  begin failures++; $display("FAIL no result decided at a lower bit"); end
    if (eqn == 0)  begin failures++; $display("FAIL no equal operands"); end
    if (mode == 0) begin failures++; $display("FAIL no pair where the modes differ"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
