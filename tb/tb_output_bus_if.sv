// tb_output_bus_if: hands results with random destinations and delays to the output
// bus-interface (grant given as soon as it is requested). The data event must appear on the
// bus exactly delay+2 cycles after the load cycle as {destination, 0, data}; a result for an output
// that is not configured must never reach the bus.
module tb_output_bus_if;
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
  localparam int unsigned AB = 4, DW = 11, LW = 7;
  logic          load = 1'b0, out_active = 1'b0, idle, req, drv_busy, sent;
  logic [DW-1:0] data = '0;
  logic [AB-1:0] dest = '0;
  logic [LW-1:0] delay = '0;
  logic [15:0]   drv_data;
  output_bus_if #(.ADDRESS_BITS(AB), .DELAY_W(LW)) dut (
    .clk, .rst_n, .load, .data, .dest, .delay, .out_active, .idle, .req, .grant(req),
    .drv_busy, .drv_data, .sent);
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 150; i++) begin
      logic [DW-1:0] v; logic [AB-1:0] a; int d, t0; bit act;
      v = DW'($urandom); a = AB'($urandom); d = (i < 3) ? i : $urandom_range(40);
      act = (i % 7 != 3);
      @(negedge clk);
      check(idle, "idle before load");
      load = 1'b1; data = v; dest = a; delay = LW'(d); out_active = act;
      t0 = cyc;
      @(negedge clk);
      load = 1'b0; data = '0; dest = '0; delay = '0; out_active = 1'b0;
      if (!act) begin
        repeat (50) begin
          #1 check(!drv_busy && idle, "unconfigured output stays silent");
          @(negedge clk);
        end
      end else begin
        while (!drv_busy && cyc - t0 < 100) @(negedge clk) #1;
        check(cyc - t0 == d + 2, $sformatf("sent %0d cycles after load, delay %0d", cyc - t0, d));
        check(drv_data == {a, 1'b0, v}, $sformatf("packet %h", drv_data));
        check(sent, "sent on the beat");
        @(negedge clk);
        #1 check(idle && !drv_busy, "idle after sending");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
