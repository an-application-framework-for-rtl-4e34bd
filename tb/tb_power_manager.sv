// tb_power_manager: random activity flags into a flash-based and a volatile-wrapper power
// manager. Checks each domain enable against the rules, that the volatile design keeps its
// wrapper on, and the busy/free cycle counters, including clear.
module tb_power_manager;
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
  logic clear = 1'b0, in_a = 1'b0, cw = 1'b0, cr = 1'b0, ia = 1'b0, oa = 1'b0;
  pwr_state_t st [2];
  logic [1:0] offc;
  logic [15:0] bc [2], fc [2];
  power_manager #(.FLASH_CONFIG(1'b1)) u_flash (.clk, .rst_n, .clear, .in_active(in_a),
    .cfg_write(cw), .cfg_read(cr), .int_active(ia), .out_active(oa), .state(st[0]),
    .off_complete(offc[0]), .busy_cycles(bc[0]), .free_cycles(fc[0]));
  power_manager #(.FLASH_CONFIG(1'b0)) u_volatile (.clk, .rst_n, .clear, .in_active(in_a),
    .cfg_write(cw), .cfg_read(cr), .int_active(ia), .out_active(oa), .state(st[1]),
    .off_complete(offc[1]), .busy_cycles(bc[1]), .free_cycles(fc[1]));
  int nb = 0, nf = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 500; n++) begin
      bit busy;
      @(negedge clk);
      if (n == 250) begin
        clear = 1'b1; nb = 0; nf = 0;
        @(negedge clk);
        clear = 1'b0;
      end
      {in_a, cw, cr, ia, oa} = ($urandom_range(2) == 0) ? 5'($urandom) : 5'b0;
      #1;
      busy = in_a || cw || cr || ia || oa;
      check(st[0] == {in_a, cw || cr, ia, oa}, "flash enables");
      check(st[1] == {in_a, 1'b1, ia, oa}, "volatile enables");
      check(offc[0] == !busy && !offc[1], "complete power-down only in flash design");
      if (busy) nb++; else nf++;
      @(posedge clk);
      #1 check(bc[0] == 16'(nb) && fc[0] == 16'(nf), $sformatf("counters %0d/%0d", bc[0], fc[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
