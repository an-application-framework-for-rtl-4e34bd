// tb_fu_delay: feeds a sample sequence and checks that output k holds the sample of k events
// earlier (zero before the line has filled), one cycle after each start.
module tb_fu_delay;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int unsigned DW = 11, NO = 3;
  logic start = 1'b0, done;
  logic [DW-1:0] a = '0, result [NO];
  int unsigned hist [$];
  fu_delay #(.DATA_W(DW), .NUM_OUTPUTS(NO)) dut (.clk, .rst_n, .start, .a, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [DW-1:0] v;
      v = DW'($urandom);
      hist.push_front(v);
      @(negedge clk);
      a = v; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(done, "done after one cycle");
      for (int k = 0; k < NO; k++)
        check(result[k] == ((k < hist.size()) ? DW'(hist[k]) : '0),
              $sformatf("sample %0d tap %0d gave %0d", i, k, result[k]));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
