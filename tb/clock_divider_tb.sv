// clock_divider_tb: checks that the divider pulses `tick` for exactly one
// clock in every DIV, starting DIV clocks after reset, for DIV = 7 and for
// the default of 50 (4 MHz -> 80 kHz), and that reset restarts the count.
module clock_divider_tb;
  logic clk = 1'b0;
  logic rst;
  logic tick7, tick50;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.DIV(7)) dut7 (.clk(clk), .rst(rst), .tick(tick7));
  clock_divider dut50 (.clk(clk), .rst(rst), .tick(tick50));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run n clocks after reset release and compare both ticks with e % DIV == 0.
  task automatic run(int n);
    for (int e = 1; e <= n; e++) begin
      @(posedge clk); #1;
      check(tick7 == (e % 7 == 0), $sformatf("DIV=7 edge %0d tick=%0b", e, tick7));
      check(tick50 == (e % 50 == 0), $sformatf("DIV=50 edge %0d tick=%0b", e, tick50));
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(530);
    // Reset in mid-count restarts the period.
    rst = 1'b1;
    @(posedge clk); #1;
    check(!tick7 && !tick50, "ticks low in reset");
    rst = 1'b0;
    run(120);
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
