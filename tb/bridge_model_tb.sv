// bridge_model_tb: applies all 64 gate patterns; the six patterns of the
// switch table must give their leg and load voltages, every other pattern
// must be flagged invalid, and shoot-through must flag S1+S3 or S2+S4.
module bridge_model_tb;
  import mlpwm_pkg::*;
  gates_t gates;
  logic [1:0] va, vb;
  level_t vo;
  logic valid, shoot_through;
  int checks = 0, failures = 0;

  bridge_model dut (.gates(gates), .va(va), .vb(vb), .vo(vo), .valid(valid),
                    .shoot_through(shoot_through));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int p = 0; p < 64; p++) begin
      int eva, evb;
      bit ev;
      bit [5:0] g;
      g = 6'(p);
      gates = gates_t'(g);
      #1;
      // g = {S6,S5,S4,S3,S2,S1}
      ev = 1'b1;
      case (g)
        6'b001001: begin eva = 2; evb = 0; end
        6'b101000: begin eva = 1; evb = 0; end
        6'b001100: begin eva = 0; evb = 0; end
        6'b000011: begin eva = 1; evb = 1; end
        6'b010010: begin eva = 0; evb = 2; end
        6'b000110: begin eva = 0; evb = 1; end
        default:   begin eva = 0; evb = 0; ev = 1'b0; end
      endcase
      check(valid == ev, $sformatf("pattern %b valid=%0b", g, valid));
      check(int'(va) == eva && int'(vb) == evb, $sformatf("pattern %b va=%0d vb=%0d", g, va, vb));
      check(int'(vo) == eva - evb, $sformatf("pattern %b vo=%0d", g, vo));
      check(shoot_through == ((g[0] && g[2]) || (g[1] && g[3])), $sformatf("pattern %b shoot", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
