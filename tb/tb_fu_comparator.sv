// tb_fu_comparator: checks the comparator's 0/1 verdict (operand greater than threshold) for
// random operands and thresholds, including equal values, and its one-cycle latency.
module tb_fu_comparator;
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
  localparam int unsigned DW = 11;
  logic start = 1'b0, done;
  logic [DW-1:0] a = '0, threshold = '0, result;
  fu_comparator #(.DATA_W(DW)) dut (.clk, .rst_n, .start, .a, .threshold, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = DW'($urandom); threshold = (i % 5 == 0) ? a : DW'($urandom); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(done, "done one cycle after start");
      check(result == ((int'(a) > int'(threshold)) ? 1 : 0),
            $sformatf("%0d vs threshold %0d gave %0d", a, threshold, result));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
