// tb_output_fifo: packets for several addresses pass on the bus; only data events addressed to
// the FIFO may come out on the network side, in order. The network is slow to accept, so the
// FIFO fills and the bus-interface must hold the last event instead of losing it while the
// testbench spaces packets so that a correct schedule would allow. It also checks the FIFO's
// power-domain enables: listening, taking an event and sending to the network must each occur.
module tb_output_fifo;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int unsigned ID = 9, DW = 11;
  logic          bus_busy = 1'b0, net_valid, net_ready = 1'b0, overrun;
  out_fifo_pwr_t pst;
  int            st_listen = 0, st_take = 0, st_net = 0;
  logic [15:0]   bus_data = '0;
  logic [DW-1:0] net_data;
  output_fifo #(.MOD_ID(ID), .DEPTH(4)) dut (.clk, .rst_n, .bus_busy, .bus_data, .net_valid,
    .net_ready, .net_data, .pwr_state(pst), .overrun);
  logic [DW-1:0] exp_q [$];
  int got = 0, ovr = 0;
  always @(posedge clk) if (rst_n) begin
    if (overrun) ovr++;
    if (pst == 3'b100) st_listen++;
    if (pst == 3'b110) st_take++;
    if (pst == 3'b011) st_net++;
    if (net_valid) check(pst.net_out_on && pst.int_on, "storage and network output on while offering");
    if (net_valid && net_ready) begin
      if (got < exp_q.size()) check(net_data == exp_q[got], $sformatf("value %0d", got));
      else check(1'b0, "unexpected value");
      got++;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] p;
      p = 16'($urandom);
      if ($urandom_range(1) == 0) p[15:12] = 4'(ID);
      if (p[15:12] == 4'(ID) && !p[11]) exp_q.push_back(p[10:0]);
      @(negedge clk);
      bus_busy = 1'b1; bus_data = p;
      @(negedge clk);
      bus_busy = 1'b0; bus_data = '0;
      // the network accepts in bursts; wait while FIFO and bus-interface are both full
      net_ready = (n % 40) > 25;
      while (dut.full && dut.d_rdy) begin
        net_ready = 1'b1;
        @(negedge clk);
      end
    end
    net_ready = 1'b1;
    repeat (40) @(negedge clk);
    check(got == exp_q.size(), $sformatf("%0d expected, %0d delivered", exp_q.size(), got));
    check(ovr == 0, "no overrun");
    check(pst == 3'b000, "all domains off at the end");
    check(st_listen > 0 && st_take > 0 && st_net > 0, "listen, take and network-transfer states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
