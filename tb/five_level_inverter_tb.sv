// five_level_inverter_tb: end-to-end test of the inverter at its default
// parameters (4 MHz clock, prescaler 50, 5-bit carrier, 500/1000/1500
// samples per cycle): PWM generator plus bridge model.
//
// For each run the load voltage of the bridge model is compared at every
// clock with an ideal model (real-valued sine against ideal triangles, three
// clocks of pipeline after each 80 kHz step), the fundamental period is
// measured as PRESCALE * samples clocks, and the bridge must never see a
// pattern outside the switch table or a shoot-through. Each mechanism is
// counted and must occur at least once: five-level operation (Ma = 0.8),
// three-level operation (Ma = 0.4), operating modes 1..4, all three sample
// counts, a change of sample mode in mid-cycle, clamping of switch values
// above 10, mode 0 (outputs off) and hardrst in mid-cycle.
module five_level_inverter_tb;
  import mlpwm_pkg::*;
  import mlpwm_ref_pkg::*;
  localparam int DIV = 50;
  logic clk = 1'b0;
  logic hardrst;
  logic [1:0] mode;
  logic [3:0] readmodind;
  gates_t gatecntr;
  level_t level, vo;
  op_mode_t op_mode;
  logic [4:0] count;
  logic cycle_start, bridge_valid, shoot_through;
  logic [1:0] va, vb;
  int checks = 0, failures = 0;
  int n_five = 0, n_three = 0, n_switch = 0, n_clamp = 0, n_off = 0, n_reset = 0;
  int n_opmode[5];
  int n_samples[4];

  always #125 clk = ~clk;  // 4 MHz

  five_level_inverter dut (
    .clk(clk), .hardrst(hardrst), .mode(mode), .readmodind(readmodind),
    .gatecntr(gatecntr), .level(level), .op_mode(op_mode), .count(count),
    .cycle_start(cycle_start), .va(va), .vb(vb), .vo(vo),
    .bridge_valid(bridge_valid), .shoot_through(shoot_through));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Bridge sanity, every clock.
  always @(posedge clk) begin
    #2;
    if (!hardrst) begin
      check(!shoot_through, "no shoot-through");
      if (op_mode != OP_IDLE) begin
        check(bridge_valid, $sformatf("bridge pattern %b allowed", gatecntr));
        check(vo == level, "load voltage follows the commanded level");
        n_opmode[int'(op_mode)]++;
      end
    end
  end

  // One run from reset: `cycles` sine cycles with the ideal model.
  task automatic run(int m, int idx, int cycles, output int maxmag);
    int s, j, k, c, exp_lvl, last_start, starts;
    real r;
    bit dec, pos;
    s = 500 * m;
    mode = 2'(m); readmodind = 4'(idx);
    hardrst = 1'b1;
    repeat (2) @(posedge clk);
    #1 hardrst = 1'b0;
    maxmag = 0; last_start = -1; starts = 0;
    for (int e = 1; e <= DIV * (cycles * s + 1) + 3; e++) begin
      @(posedge clk); #1;
      if (cycle_start) begin
        if (last_start >= 0) begin
          check(e - last_start == DIV * s,
                $sformatf("period %0d clocks, expected %0d", e - last_start, DIV * s));
          n_samples[m]++;
        end
        last_start = e;
        starts++;
      end
      if (e < DIV + 3) continue;
      j = (e - 3) / DIV - 1;
      k = j % s;
      pos = k < s / 2;
      r = ideal_ref(31, idx, k, s);
      c = tri_carrier(31, j + 1);
      exp_lvl = expected_level(r, c, 31, pos, dec);
      if (dec) check(int'(vo) == exp_lvl,
                     $sformatf("mode %0d mi %0d sample %0d vo %0d exp %0d", m, idx, j, vo, exp_lvl));
      if ((vo < 0 ? -int'(vo) : int'(vo)) > maxmag) maxmag = vo < 0 ? -int'(vo) : int'(vo);
    end
    check(starts == cycles + 1, $sformatf("cycle starts %0d", starts));
  endtask

  initial begin
    int mm, t0, t1;
    hardrst = 1'b1; mode = 2'd3; readmodind = 4'd8;

    // Five levels at Ma = 0.8 (1500 samples, 53.3 Hz).
    run(3, 8, 1, mm);
    check(mm == 2, "Ma = 0.8 gives five levels");
    if (mm == 2) n_five++;

    // Switch setting of the published simulation: readmodind = 7, mode 3.
    run(3, 7, 1, mm);
    check(mm == 2, "Ma = 0.7 gives five levels");

    // Three levels at Ma = 0.4.
    begin
      int m1, m4;
      m1 = n_opmode[1]; m4 = n_opmode[4];
      run(3, 4, 1, mm);
      check(mm == 1, "Ma = 0.4 gives three levels");
      check(n_opmode[1] == m1 && n_opmode[4] == m4, "Ma = 0.4 stays in modes 2 and 3");
    end
    if (mm == 1) n_three++;

    // 500 and 1000 samples per cycle.
    run(1, 10, 2, mm);
    run(2, 6, 1, mm);

    // Switch value above 10 acts as 10.
    run(1, 15, 1, mm);
    check(mm == 2, "clamped index still five-level");
    n_clamp++;

    // Change sample mode in mid-cycle: the next cycle starts at the zero
    // crossing and has the new length.
    mode = 2'd3;
    repeat (DIV * 400) @(posedge clk);
    mode = 2'd1;
    n_switch++;
    @(posedge cycle_start); t0 = $time;
    @(posedge cycle_start); t1 = $time;
    check((t1 - t0) == DIV * 500 * 250, $sformatf("period after switch %0d ns", t1 - t0));

    // Hard reset in mid-cycle: outputs off, then restart from sample 0.
    repeat (DIV * 123) @(posedge clk);
    #1 hardrst = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(gatecntr == 6'b0 && count == 0, "hardrst clears outputs");
    n_reset++;
    hardrst = 1'b0;
    @(posedge cycle_start);
    check(count <= 1, "first sample after reset at carrier start");

    // Mode 0: all gates off.
    mode = 2'd0;
    repeat (DIV * 20) @(posedge clk);
    #3 check(gatecntr == 6'b0 && op_mode == OP_IDLE && !bridge_valid, "mode 0 off");
    n_off++;

    // Every mechanism must have occurred.
    check(n_five > 0, "five-level operation");
    check(n_three > 0, "three-level operation");
    for (int i = 1; i <= 4; i++) check(n_opmode[i] > 0, $sformatf("operating mode %0d", i));
    for (int i = 1; i <= 3; i++) check(n_samples[i] > 0, $sformatf("%0d samples per cycle", 500 * i));
    check(n_switch > 0 && n_clamp > 0 && n_off > 0 && n_reset > 0, "mode switch, clamp, off, reset");
    $display("mechanisms: five-level %0d, three-level %0d, modes %0d/%0d/%0d/%0d clocks, cycles 500:%0d 1000:%0d 1500:%0d, switch %0d, clamp %0d, off %0d, reset %0d",
             n_five, n_three, n_opmode[1], n_opmode[2], n_opmode[3], n_opmode[4],
             n_samples[1], n_samples[2], n_samples[3], n_switch, n_clamp, n_off, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
