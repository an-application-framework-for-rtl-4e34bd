// tb_input_fifo: the network offers random packets while the bus grants the FIFO only now and
// then, so the 4-entry FIFO fills up and must hold the network off with net_ready. Every packet
// must reach the bus once, in order and intact. The power-domain enables must follow the
// activity: storage on exactly while packets are held or written, bus interface on while sending,
// and the storage-only, all-on and bus-only states must all occur.
module tb_input_fifo;
  import dfp_pkg::*;
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
  logic        net_valid = 1'b0, net_ready, req, grant, drv_busy;
  in_fifo_pwr_t pst;
  logic [15:0] net_packet = '0, drv_data;
  logic [2:0]  count;
  logic        allow = 1'b0;
  assign grant = req && allow;
  input_fifo #(.DEPTH(4)) dut (.clk, .rst_n, .net_valid, .net_ready, .net_packet, .req, .grant,
                               .drv_busy, .drv_data, .pwr_state(pst), .count);
  logic [15:0] sent_q [$];
  int got = 0, full_seen = 0, st_store = 0, st_send = 0, st_drain = 0;
  always @(posedge clk) if (rst_n) begin
    if (net_valid && net_ready) sent_q.push_back(net_packet);
    if (!net_ready) full_seen++;
    if (pst == 3'b110) st_store++;
    if (pst == 3'b111) st_send++;
    if (pst == 3'b101) st_drain++;
    check(pst.net_if_on && pst.int_on == (count != 0 || net_valid) && (pst.bus_if_on || !(req || drv_busy)),
          "power state matches activity");
    if (drv_busy) begin
      if (got < sent_q.size()) check(drv_data == sent_q[got], $sformatf("packet %0d", got));
      else check(1'b0, "packet on the bus that was never sent");
      got++;
    end
  end
  always @(negedge clk) allow <= ($urandom_range(3) == 0);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      net_valid = ($urandom_range(1) == 0);
      net_packet = 16'($urandom);
    end
    @(negedge clk);
    net_valid = 1'b0;
    repeat (100) @(negedge clk);
    check(got == sent_q.size() && got > 50, $sformatf("%0d accepted, %0d sent", sent_q.size(), got));
    check(full_seen > 0, "FIFO filled and held the network off");
    check(pst == 3'b100 && count == 0, "empty and idle at the end");
    check(st_store > 0 && st_send > 0 && st_drain > 0, "storage-only, all-on and drain states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
