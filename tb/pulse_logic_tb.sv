// pulse_logic_tb: random comparator results, half-cycle flags and reference
// values; checks the level, the six gate pulses (against the switch table
// held in the reference package) and the operating mode, with the one-clock
// alignment of the half-cycle flag and the one-clock output register.
module pulse_logic_tb;
  import mlpwm_pkg::*;
  import mlpwm_ref_pkg::*;
  logic clk = 1'b0;
  logic rst, active, pos_half, gt_hi, gt_lo;
  logic [5:0] ref_i;
  gates_t gates;
  level_t level;
  op_mode_t op_mode;
  int checks = 0, failures = 0;
  int seen_mode[5];

  always #5 clk = ~clk;

  pulse_logic dut (.clk(clk), .rst(rst), .active(active), .pos_half(pos_half),
                   .ref_i(ref_i), .gt_hi(gt_hi), .gt_lo(gt_lo),
                   .gates(gates), .level(level), .op_mode(op_mode));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit p_pos, p_act;
    int p_ref;
    int mag, exp_lvl, exp_mode;
    rst = 1'b1; active = 1'b0; pos_half = 1'b1; gt_hi = 1'b0; gt_lo = 1'b0; ref_i = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(gates == 6'b0 && op_mode == OP_IDLE, "reset: gates off");
    // Inputs of the previous clock (half-cycle, active, reference).
    p_pos = 1'b1; p_act = 1'b0; p_ref = 0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 3);
      gt_lo = (r != 0);
      gt_hi = (r == 3);
      @(posedge clk); #1;
      mag = gt_hi ? 2 : (gt_lo ? 1 : 0);
      exp_lvl = p_pos ? mag : -mag;
      exp_mode = !p_act ? 0 : (p_pos ? ((p_ref > 31) ? 1 : 2) : ((p_ref > 31) ? 4 : 3));
      if (i > 0) begin
        if (p_act) begin
          check(int'(level) == exp_lvl, $sformatf("level %0d exp %0d", level, exp_lvl));
          check(gates == expected_gates(exp_lvl, p_pos),
                $sformatf("gates %b exp %b (lvl %0d)", gates, expected_gates(exp_lvl, p_pos), exp_lvl));
        end else begin
          check(gates == 6'b0 && level == 0, "inactive: gates off");
        end
        check(int'(op_mode) == exp_mode, $sformatf("op_mode %0d exp %0d", op_mode, exp_mode));
        seen_mode[exp_mode]++;
      end
      // New half-cycle / reference inputs for the next clock.
      p_pos = pos_half; p_act = active; p_ref = int'(ref_i);
      pos_half = ($urandom_range(0, 1) == 1);
      active = ($urandom_range(0, 9) != 0);
      ref_i = 6'($urandom_range(0, 62));
    end
    for (int m = 0; m < 5; m++) check(seen_mode[m] > 0, $sformatf("mode %0d exercised", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
