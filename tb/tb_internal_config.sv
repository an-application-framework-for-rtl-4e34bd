// tb_internal_config: writes internal registers and checks that each execution index sees
// its own pair of registers on int_config_value[0..1].
module tb_internal_config;
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
  localparam int unsigned AB = 4, IB = 3, NR = 3, VW = 14 - AB - IB, CW = 10;
  logic [CW-1:0] pkt = '0;
  logic          rdy = 1'b0, used, cfg_write;
  logic [1:0]    idx = '0;
  logic [VW-1:0] val [2];
  internal_config #(.ADDRESS_BITS(AB), .INT_CONFIG_BITS(IB), .NUM_REUSE(NR)) dut (
    .clk, .rst_n, .int_config_packet(pkt), .int_config_ready(rdy), .int_config_used(used),
    .config_index(idx), .int_config_value(val), .cfg_write);
  int unsigned model [8];
  initial begin
    foreach (model[r]) model[r] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 80; n++) begin
      int r, v;
      r = $urandom_range(7);
      v = $urandom_range((1 << VW) - 1);
      @(negedge clk);
      pkt = CW'((r << VW) | v);
      rdy = 1'b1;
      #1 check(used && cfg_write, "sub-packet taken at once");
      @(negedge clk);
      rdy = 1'b0;
      model[r] = v;
      for (int i = 0; i < NR; i++) begin
        idx = 2'(i);
        #1;
        check(val[0] == VW'(model[2*i]) && val[1] == VW'(model[2*i+1]),
              $sformatf("index %0d values %0d %0d", i, val[0], val[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
