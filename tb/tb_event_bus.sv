// tb_event_bus: three senders (bus_tx) share an 8-bit bus, so every packet takes two beats.
// Packets are loaded at random, often in the same cycle. A receiver model rebuilds packets
// from the bus; each must arrive intact and exactly once, beats of two packets must never mix,
// and when senders 0 and 2 ask in the same cycle sender 0 must go first.
module tb_event_bus;
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
  localparam int unsigned N = 3, BW = 8;
  logic [N-1:0]  load = '0, idle, req, grant, busy, done;
  logic [15:0]   pkt [N];
  logic [BW-1:0] dd [N];
  logic          bus_busy, collision;
  logic [BW-1:0] bus_data;
  logic [15:0]   waits;
  for (genvar i = 0; i < N; i++) begin : g_tx
    bus_tx #(.BUS_WIDTH(BW)) u_tx (.clk, .rst_n, .load(load[i]), .packet(pkt[i]), .idle(idle[i]),
      .req(req[i]), .grant(grant[i]), .drv_busy(busy[i]), .drv_data(dd[i]), .done(done[i]));
  end
  event_bus #(.N_DRV(N), .BUS_WIDTH(BW)) dut (.clk, .rst_n, .req, .grant, .drv_busy(busy),
    .drv_data(dd), .bus_busy, .bus_data, .collision, .grant_waits(waits));

  logic [15:0] sent_q [$], got_q [$];
  logic [7:0]  hi;
  int          beat = 0;
  always @(posedge clk) if (rst_n) begin
    if (collision) check(1'b0, "collision");
    if (bus_busy) begin
      if (beat == 0) begin hi = bus_data; beat = 1; end
      else begin got_q.push_back({hi, bus_data}); beat = 0; end
    end else if (beat != 0) begin
      check(1'b0, "packet cut short");
      beat = 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // priority: senders 0 and 2 load together
    @(negedge clk);
    pkt[0] = 16'hA0A0; pkt[2] = 16'hC2C2; load = 3'b101;
    @(negedge clk);
    load = '0;
    repeat (8) @(negedge clk);
    check(got_q.size() == 2 && got_q[0] == 16'hA0A0 && got_q[1] == 16'hC2C2, "priority order");
    got_q.delete();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      load = '0;
      for (int i = 0; i < N; i++) begin
        if (idle[i] && $urandom_range(2) == 0) begin
          pkt[i] = 16'($urandom);
          load[i] = 1'b1;
          sent_q.push_back(pkt[i]);
        end
      end
    end
    @(negedge clk);
    load = '0;
    repeat (30) @(negedge clk);
    check(got_q.size() == sent_q.size(), $sformatf("%0d sent, %0d received", sent_q.size(),
                                                   got_q.size()));
    sent_q.sort(); got_q.sort();
    foreach (sent_q[k]) if (k < got_q.size()) check(sent_q[k] == got_q[k], "packet intact");
    check(waits > 0, "some requests had to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
