// tb_wrapper_config: writes wrapper registers through configuration sub-packets and checks the
// ready flag, the reuse count, and the destination, delay and active flag of every output for
// every execution index, including outputs that were never configured.
module tb_wrapper_config;
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
  localparam int unsigned AB = 4, WB = 4, NO = 2, NR = 3, VW = 14 - AB - WB, CW = 10;
  logic [CW-1:0] pkt = '0;
  logic          rdy = 1'b0, used, module_active, cfg_write;
  logic [1:0]    idx = '0;
  logic [AB-1:0] dest [NO];
  logic [VW-1:0] delay [NO];
  logic [NO-1:0] act;
  logic [VW-1:0] reuse;
  wrapper_config #(.ADDRESS_BITS(AB), .WR_CONFIG_BITS(WB), .NUM_OUTPUTS(NO), .NUM_REUSE(NR)) dut (
    .clk, .rst_n, .wr_config_packet(pkt), .wr_config_ready(rdy), .wr_config_used(used),
    .config_index(idx), .destination_addresses(dest), .delay_values(delay),
    .out_reg_active(act), .module_active, .reuse_count(reuse), .cfg_write);

  int unsigned model [16];
  bit          wrote [16];

  task automatic write(int r, int v);
    @(negedge clk);
    pkt = CW'((r << VW) | (v & ((1 << VW) - 1)));
    rdy = 1'b1;
    #1 check(used && cfg_write, "sub-packet taken at once");
    @(negedge clk);
    rdy = 1'b0;
    model[r] = v & ((1 << VW) - 1);
    wrote[r] = 1'b1;
  endtask

  task automatic compare();
    check(module_active == model[0][0], "module_active");
    check(reuse == VW'(model[1]), "reuse count");
    for (int i = 0; i < NR; i++) begin
      @(negedge clk);
      idx = 2'(i);
      #1;
      for (int k = 0; k < NO; k++) begin
        int s = 2 + 2 * (i * NO + k);
        check(act[k] == wrote[s], $sformatf("active idx %0d out %0d", i, k));
        check(dest[k] == AB'(model[s]), $sformatf("dest idx %0d out %0d", i, k));
        check(delay[k] == VW'(model[s+1]), $sformatf("delay idx %0d out %0d", i, k));
      end
    end
  endtask

  initial begin
    foreach (model[r]) begin model[r] = 0; wrote[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    compare();
    write(0, 1);
    write(1, 3);
    compare();
    for (int n = 0; n < 60; n++) begin
      write($urandom_range(15), $urandom);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
