// mpw_modulator_tb: runs the PWM generator (prescaler reduced to 5 to keep
// the run short) through whole sine cycles in each sample mode and at
// modulation indices 0.4, 0.6, 0.8 and 1.0. At every clock the gate pulses
// are compared with an ideal model: sample j of the sine (real-valued
// 62*Ma*|sin|) against carrier step j+1 of a 0..31..0 triangle, lagging the
// tick that produced it by three clocks. Samples whose reference lies within
// 0.6 of a carrier are not judged (fixed-point rounding). Also checks the
// three-level limit at Ma <= 0.5, that all five levels and operating modes
// occur at Ma > 0.5, the cycle length, and mode 0 (all gates off).
module mpw_modulator_tb;
  import mlpwm_pkg::*;
  import mlpwm_ref_pkg::*;
  localparam int DIV = 5;
  logic clk = 1'b0;
  logic hardrst;
  logic [1:0] mode;
  logic [3:0] readmodind;
  gates_t gatecntr;
  level_t level;
  op_mode_t op_mode;
  logic [4:0] count;
  logic cycle_start;
  int checks = 0, failures = 0;
  int lvl_seen[5];
  int mode_seen[5];

  always #5 clk = ~clk;

  mpw_modulator #(.PRESCALE(DIV)) dut (
    .clk(clk), .hardrst(hardrst), .mode(mode), .readmodind(readmodind),
    .gatecntr(gatecntr), .level(level), .op_mode(op_mode), .count(count),
    .cycle_start(cycle_start));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int m, int idx);
    int s, j, k, c, exp_lvl, maxmag, starts, last_start;
    real r;
    bit dec, pos;
    s = 500 * m;
    mode = 2'(m); readmodind = 4'(idx);
    hardrst = 1'b1;
    repeat (2) @(posedge clk);
    #1 hardrst = 1'b0;
    maxmag = 0; starts = 0; last_start = -1;
    for (int e = 1; e <= DIV * (s + 2) + 3; e++) begin
      @(posedge clk); #1;
      if (cycle_start) begin
        if (last_start >= 0)
          check(e - last_start == DIV * s, $sformatf("cycle length %0d clocks", e - last_start));
        last_start = e;
        starts++;
      end
      if (e < DIV + 3) begin
        check(gatecntr == 6'b0, "gates off before the first sample");
        continue;
      end
      j = (e - 3) / DIV - 1;
      k = j % s;
      pos = k < s / 2;
      r = ideal_ref(31, idx, k, s);
      c = tri_carrier(31, j + 1);
      exp_lvl = expected_level(r, c, 31, pos, dec);
      if (dec) begin
        check(int'(level) == exp_lvl,
              $sformatf("mode %0d mi %0d sample %0d level %0d exp %0d (ref %f car %0d)",
                        m, idx, j, level, exp_lvl, r, c));
        check(gatecntr == expected_gates(exp_lvl, pos),
              $sformatf("sample %0d gates %b", j, gatecntr));
      end
      lvl_seen[int'(level) + 2]++;
      mode_seen[int'(op_mode)]++;
      if ((level < 0 ? -int'(level) : int'(level)) > maxmag)
        maxmag = level < 0 ? -int'(level) : int'(level);
    end
    check(starts == 2, $sformatf("cycle starts %0d", starts));
    if (idx <= 5) check(maxmag <= 1, $sformatf("mi %0d: three levels only", idx));
    else          check(maxmag == 2, $sformatf("mi %0d: five levels", idx));
  endtask

  initial begin
    hardrst = 1'b1; mode = 2'd3; readmodind = 4'd8;
    run(3, 8);
    for (int l = 0; l < 5; l++) check(lvl_seen[l] > 0, $sformatf("level %0d seen", l - 2));
    for (int m = 1; m < 5; m++) check(mode_seen[m] > 0, $sformatf("op mode %0d seen", m));
    run(3, 4);
    run(1, 10);
    run(2, 6);
    // Mode 0: all gates off.
    mode = 2'd0;
    repeat (DIV * 10) @(posedge clk);
    #1 check(gatecntr == 6'b0 && op_mode == OP_IDLE, "mode 0 turns the gates off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
