// sine_sampler_tb: runs full sine cycles for each mode (500/1000/1500
// samples) and several switch settings, with tick held high, and compares
// every sample with the ideal 62*Ma*|sin| (within 1 LSB), the half-cycle flag,
// the cycle length and the cycle-start pulse. Also checks mode 0 (off).
module sine_sampler_tb;
  import mlpwm_ref_pkg::*;
  logic clk = 1'b0;
  logic rst, tick;
  logic [1:0] mode;
  logic [3:0] mi;
  logic [5:0] ref_o;
  logic pos_half, active, cycle_start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_sampler dut (.clk(clk), .rst(rst), .tick(tick), .mode(mode), .mi(mi),
                    .ref_o(ref_o), .pos_half(pos_half), .active(active),
                    .cycle_start(cycle_start));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_cycle(int m, int idx);
    int s;
    real r;
    int peak;
    s = 500 * m;
    mode = 2'(m); mi = 4'(idx);
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0; tick = 1'b1;
    peak = 0;
    for (int k = 0; k <= s; k++) begin
      @(posedge clk); #1;
      r = ideal_ref(31, idx, k % s, s);
      check(active, "active");
      check((real'(ref_o) - r) <= 1.0 && (r - real'(ref_o)) <= 1.0,
            $sformatf("mode %0d mi %0d k %0d ref=%0d ideal=%f", m, idx, k, ref_o, r));
      check(pos_half == ((k % s) < s / 2), $sformatf("pos_half at k=%0d", k));
      check(cycle_start == ((k % s) == 0), $sformatf("cycle_start at k=%0d", k));
      if (int'(ref_o) > peak) peak = int'(ref_o);
    end
    check(peak == ((idx > 10 ? 10 : idx) * 62 + 5) / 10,
          $sformatf("mode %0d mi %0d peak=%0d", m, idx, peak));
  endtask

  initial begin
    rst = 1'b1; tick = 1'b0; mode = 2'd3; mi = 4'd8;
    repeat (2) @(posedge clk);
    run_cycle(3, 8);
    run_cycle(3, 4);
    run_cycle(1, 10);
    run_cycle(2, 5);
    run_cycle(1, 15);
    run_cycle(2, 0);
    // Samples only advance on tick.
    tick = 1'b0;
    begin
      logic [5:0] held;
      held = ref_o;
      repeat (10) @(posedge clk);
      #1 check(ref_o == held && cycle_start == 1'b0, "no change without tick");
    end
    // Mode 0 switches the generator off.
    tick = 1'b1; mode = 2'd0;
    repeat (3) @(posedge clk);
    #1 check(!active && ref_o == 0, "mode 0 is off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
