// comparator_tb: random and corner operands; gt must equal (a > b) of the
// previous clock, and reset must clear it.
module comparator_tb;
  logic clk = 1'b0;
  logic rst;
  logic [5:0] a, b;
  logic gt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comparator #(.W(6)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .gt(gt));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ea, eb;
    rst = 1'b1; a = 6'd9; b = 6'd1;
    @(posedge clk); #1;
    check(gt == 1'b0, "reset clears gt");
    rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      case (i % 4)
        0: begin ea = $urandom_range(0, 63); eb = ea; end
        1: begin ea = $urandom_range(1, 63); eb = ea - 1; end
        default: begin ea = $urandom_range(0, 63); eb = $urandom_range(0, 63); end
      endcase
      a = 6'(ea); b = 6'(eb);
      @(posedge clk); #1;
      check(gt == (ea > eb), $sformatf("a=%0d b=%0d gt=%0b", ea, eb, gt));
    end
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
