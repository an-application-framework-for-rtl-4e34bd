// tb_fu_adc: a behavioural analog comparator (input level against the DAC level) drives the
// successive-approximation logic. For random levels and resolutions the code must equal the
// level cut to that resolution, and a conversion of R bits must end R+1 cycles after start.
module tb_fu_adc;
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
  localparam int unsigned DW = 11, RW = 7;
  logic start = 1'b0, done, busy, comp;
  logic [RW-1:0] resolution = '0;
  logic [DW-1:0] dac_code, result;
  int unsigned vin = 0;
  assign comp = (vin >= dac_code);
  fu_adc #(.DATA_W(DW), .RES_W(RW)) dut (
    .clk, .rst_n, .start, .resolution, .dac_code, .comp, .busy, .done, .result);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 300; i++) begin
      int res, lat;
      res = (i % 4 == 0) ? 8 : $urandom_range(1, DW);
      if (i % 37 == 0) res = 0;            // 0 means full resolution
      vin = (i < 3) ? ((i == 0) ? 0 : (i == 1) ? 2047 : 1024) : $urandom_range(2047);
      @(negedge clk);
      resolution = RW'(res); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      if (res == 0) res = DW;
      check(lat == res + 1, $sformatf("conversion took %0d cycles for %0d bits", lat - 1, res));
      check(result == DW'(vin >> (DW - res)),
            $sformatf("level %0d at %0d bits gave %0d expected %0d", vin, res, result,
                      vin >> (DW - res)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
