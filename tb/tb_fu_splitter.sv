// tb_fu_splitter: every output register must carry a copy of the operand one cycle after
// start (three outputs here).
module tb_fu_splitter;
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
  fu_splitter #(.DATA_W(DW), .NUM_OUTPUTS(NO)) dut (.clk, .rst_n, .start, .a, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [DW-1:0] v;
      v = DW'($urandom);
      @(negedge clk);
      a = v; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(done, "done after one cycle");
      for (int k = 0; k < NO; k++) check(result[k] == v, $sformatf("copy %0d wrong", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
