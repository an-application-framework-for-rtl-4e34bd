// tb_fu_adder: checks the adder internal module against the sum of random operands,
// the one-cycle latency of done and that done pulses for exactly one cycle.
module tb_fu_adder;
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
  logic [DW-1:0] a = '0, b = '0, result;
  fu_adder #(.DATA_W(DW)) dut (.clk, .rst_n, .start, .a, .b, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [DW-1:0] ea;
      @(negedge clk);
      a = DW'($urandom); b = DW'($urandom); start = 1'b1;
      ea = DW'(int'(a) + int'(b));
      @(negedge clk);
      start = 1'b0;
      check(done, "done one cycle after start");
      check(result == ea, $sformatf("%0d + %0d gave %0d expected %0d", a, b, result, ea));
      @(negedge clk);
      check(!done, "done lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
