// tb_fu_timer: with a period P the timer must tick every P cycles exactly, counting ticks;
// it must stay silent while disabled or with period 0, and follow a new period.
module tb_fu_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int unsigned DW = 11, PW = 16;
  logic enable = 1'b0, done;
  logic [PW-1:0] period = '0;
  logic [DW-1:0] result;
  int cyc = 0, last = -1, ticks = 0, per_now = 0;
  fu_timer #(.DATA_W(DW), .PERIOD_W(PW)) dut (.clk, .rst_n, .enable, .period, .done, .result);
  always @(posedge clk) begin
    cyc++;
    if (rst_n && done) begin
      ticks++;
      check(result == DW'(ticks), $sformatf("tick value %0d expected %0d", result, ticks));
      if (last >= 0)
        check(cyc - last == per_now, $sformatf("tick spacing %0d expected %0d", cyc - last,
                                                per_now));
      last = cyc;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (50) @(posedge clk);
    check(ticks == 0, "no tick while disabled");
    @(negedge clk);
    period = 16'd37; per_now = 37; enable = 1'b1;
    repeat (37 * 10 + 5) @(posedge clk);
    check(ticks == 10, $sformatf("%0d ticks in 10 periods", ticks));
    @(negedge clk);
    enable = 1'b0; last = -1;
    repeat (100) @(posedge clk);
    check(ticks == 10, "silent when disabled");
    @(negedge clk);
    period = 16'd5; per_now = 5; enable = 1'b1;
    repeat (5 * 20 + 2) @(posedge clk);
    check(ticks == 30, $sformatf("%0d ticks after the second run", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
