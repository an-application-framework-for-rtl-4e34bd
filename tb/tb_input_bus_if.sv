// tb_input_bus_if: drives packets onto a 16-bit bus and, at the same time, the same packets
// as four 4-bit beats onto a narrow bus, with an interface on each. Checks address matching,
// the split into data / wrapper / internal sub-packets, the ready/used handshake, the overrun
// report and the one-cycle delay from the last beat to ready.
module tb_input_bus_if;
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
  import dfp_pkg::*;
  localparam int unsigned AB = 4, DW = 11, CW = 10, ID = 5;
  logic        bw_busy = 1'b0, bn_busy = 1'b0;
  logic [15:0] bw_data = '0;
  logic [3:0]  bn_data = '0;
  logic [DW-1:0] d [2];
  logic [CW-1:0] wp [2], ip [2];
  logic [1:0] dr, wr, ir, ovr, act;
  logic [1:0] du = '0, wu = '0, iu = '0;

  input_bus_if #(.MOD_ID(ID), .ADDRESS_BITS(AB)) u_wide (
    .clk, .rst_n, .bus_busy(bw_busy), .bus_data(bw_data),
    .inp_data_packet(d[0]), .inp_data_ready(dr[0]), .inp_data_used(du[0]),
    .wr_config_packet(wp[0]), .wr_config_ready(wr[0]), .wr_config_used(wu[0]),
    .int_config_packet(ip[0]), .int_config_ready(ir[0]), .int_config_used(iu[0]),
    .overrun(ovr[0]), .active(act[0]));
  input_bus_if #(.MOD_ID(ID), .ADDRESS_BITS(AB), .BUS_WIDTH(4)) u_narrow (
    .clk, .rst_n, .bus_busy(bn_busy), .bus_data(bn_data),
    .inp_data_packet(d[1]), .inp_data_ready(dr[1]), .inp_data_used(du[1]),
    .wr_config_packet(wp[1]), .wr_config_ready(wr[1]), .wr_config_used(wu[1]),
    .int_config_packet(ip[1]), .int_config_ready(ir[1]), .int_config_used(iu[1]),
    .overrun(ovr[1]), .active(act[1]));

  int ovr_seen [2] = '{0, 0};
  always @(negedge clk) for (int j = 0; j < 2; j++) if (ovr[j]) ovr_seen[j]++;

  // one packet on each bus; the wide one goes in the cycle of the narrow one's last beat
  task automatic put(logic [15:0] p);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      bn_busy = 1'b1; bn_data = p[15 - 4*b -: 4];
      bw_busy = (b == 3); bw_data = (b == 3) ? p : '0;
    end
    @(negedge clk);
    bn_busy = 1'b0; bw_busy = 1'b0; bw_data = '0; bn_data = '0;
  endtask

  task automatic use_all();
    @(negedge clk);
    du = dr; wu = wr; iu = ir;
    @(negedge clk);
    du = '0; wu = '0; iu = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [15:0] p;
      int kind;
      bit mine;
      p = 16'($urandom);
      mine = ($urandom_range(3) != 0);
      if (mine) p[15:12] = 4'(ID);
      else if (p[15:12] == 4'(ID)) p[15:12] = 4'(ID + 1);
      put(p);                             // the check runs in the cycle after the last beat
      #1;
      kind = !p[11] ? 0 : p[10] ? 1 : 2;
      for (int j = 0; j < 2; j++) begin
        check(dr[j] == (mine && kind == 0), $sformatf("data ready %0d for %h", j, p));
        check(wr[j] == (mine && kind == 1), $sformatf("wrapper ready %0d for %h", j, p));
        check(ir[j] == (mine && kind == 2), $sformatf("internal ready %0d for %h", j, p));
        if (mine && kind == 0) check(d[j] == p[10:0], "data field");
        if (mine && kind == 1) check(wp[j] == p[9:0], "wrapper sub-packet");
        if (mine && kind == 2) check(ip[j] == p[9:0], "internal sub-packet");
        check(act[j] == mine, $sformatf("active while holding %0d %h act=%b", j, p, act[j]));
      end
      use_all();
      check(dr == '0 && wr == '0 && ir == '0, "ready drops after used");
    end
    // a second data packet before the first is used is an overrun; the first is kept
    put({4'(ID), 1'b0, 11'd123});
    put({4'(ID), 1'b0, 11'd456});
    #1;
    for (int j = 0; j < 2; j++) begin
      check(ovr_seen[j] == 1, $sformatf("overrun reported on bus %0d: %0d", j, ovr_seen[j]));
      check(dr[j] && d[j] == 11'd123, "first packet kept");
    end
    use_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
