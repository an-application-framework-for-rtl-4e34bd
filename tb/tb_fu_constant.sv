// tb_fu_constant: a trigger must produce the configured constant one cycle later, and a new
// configured value must be used by the next trigger.
module tb_fu_constant;
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
  logic [DW-1:0] value = '0, result;
  fu_constant #(.DATA_W(DW)) dut (.clk, .rst_n, .start, .value, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [DW-1:0] v;
      v = DW'($urandom);
      @(negedge clk);
      value = v; start = 1'b1;
      @(negedge clk);
      start = 1'b0; value = ~v;
      check(done && result == v, $sformatf("constant %0d gave %0d", v, result));
      @(negedge clk);
      check(!done && result == v, "result held, done one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
