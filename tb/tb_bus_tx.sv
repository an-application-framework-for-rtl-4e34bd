// tb_bus_tx: sends random packets over a 4-bit bus with grants that come after a random wait.
// Checks that nothing is driven before the grant, that the four beats follow most significant
// first on consecutive cycles with drv_busy high, that done marks the last beat and that the
// sender is idle again afterwards.
module tb_bus_tx;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int unsigned BW = 4;
  logic        load = 1'b0, idle, req, grant = 1'b0, drv_busy, done;
  logic [15:0] packet = '0;
  logic [BW-1:0] drv_data;
  bus_tx #(.BUS_WIDTH(BW)) dut (.clk, .rst_n, .load, .packet, .idle, .req, .grant, .drv_busy,
                                .drv_data, .done);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] p;
      int w;
      p = 16'($urandom);
      @(negedge clk);
      check(idle && !req, "idle before load");
      load = 1'b1; packet = p;
      @(negedge clk);
      load = 1'b0; packet = '0;
      w = $urandom_range(4);
      repeat (w) begin
        #1 check(req && !drv_busy && drv_data == '0, "waits for grant without driving");
        @(negedge clk);
      end
      grant = 1'b1;
      for (int b = 0; b < 4; b++) begin
        #1;
        check(drv_busy, $sformatf("busy on beat %0d", b));
        check(drv_data == p[15 - 4*b -: 4], $sformatf("beat %0d of %h is %h", b, p, drv_data));
        check(done == (b == 3), "done on last beat only");
        @(negedge clk);
        grant = 1'b0;
      end
      #1 check(idle && !drv_busy && drv_data == '0, "idle after the packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
