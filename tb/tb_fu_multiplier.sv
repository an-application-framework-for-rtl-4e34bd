// tb_fu_multiplier: random operands and shifts; the result must equal (a*b >> shift) cut to
// DATA_W bits and done must come exactly DATA_W+1 cycles after start (one bit per cycle), with
// busy high in between.
module tb_fu_multiplier;
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
  localparam int unsigned DW = 11, SW = 7;
  logic start = 1'b0, done, busy;
  logic [DW-1:0] a = '0, b = '0, result;
  logic [SW-1:0] shift = '0;
  fu_multiplier #(.DATA_W(DW), .SHIFT_W(SW)) dut (
    .clk, .rst_n, .start, .a, .b, .shift, .busy, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      longint unsigned p;
      int lat;
      @(negedge clk);
      a = DW'($urandom); b = DW'($urandom); shift = SW'($urandom_range(12));
      if (i < 4) begin a = '1; b = '1; end
      p = (longint'(a) * longint'(b)) >> shift;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 100) begin
        check(busy, "busy while multiplying");
        @(negedge clk);
        lat++;
      end
      check(lat == DW + 1, $sformatf("latency %0d expected %0d", lat, DW + 1));
      check(result == DW'(p), $sformatf("%0d*%0d>>%0d gave %0d expected %0d", a, b, shift,
                                         result, DW'(p)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
