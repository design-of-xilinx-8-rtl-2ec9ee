// carrier_gen_tb: checks the lower carrier against an ideal 0..31..0
// triangle (period 62 ticks), the upper carrier = lower + 31, that the
// counter only moves on tick, and that enable low holds it at zero.
module carrier_gen_tb;
  import mlpwm_ref_pkg::*;
  logic clk = 1'b0;
  logic rst, enable, tick;
  logic [4:0] lower;
  logic [5:0] upper;
  logic up;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_gen dut (.clk(clk), .rst(rst), .enable(enable), .tick(tick),
                   .lower(lower), .upper(upper), .up(up));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint steps;
    int peaks;
    rst = 1'b1; enable = 1'b1; tick = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    steps = 0; peaks = 0;
    check(lower == 0 && upper == 31, "initial value");
    for (int i = 0; i < 700; i++) begin
      tick = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (tick) steps++;
      check(int'(lower) == tri_carrier(31, steps),
            $sformatf("step %0d lower=%0d exp=%0d", steps, lower, tri_carrier(31, steps)));
      check(int'(upper) == int'(lower) + 31, $sformatf("upper=%0d lower=%0d", upper, lower));
      if (lower == 31) peaks++;
    end
    check(peaks > 0, "carrier reached its peak");
    // One carrier period is 62 ticks.
    tick = 1'b1;
    while (!(lower == 0 && up)) begin @(posedge clk); #1; end
    begin
      int n = 0;
      do begin @(posedge clk); #1; n++; end while (lower != 0);
      check(n == 62, $sformatf("carrier period %0d ticks", n));
    end
    // Disable holds the counter at zero.
    enable = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(lower == 0 && up, "held at zero while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
