// tb_dfp_processor: end-to-end test of the Architecture-III processor at its default parameters.
//
// The testbench plays the network and the analog side of the ADC. Through the input FIFO it
// sends the configuration of a three-coefficient FIR filter,
//   y[n] = (x[n]*c0 >> s) + (x[n-1]*c1 >> s) + (x[n-2]*c2 >> s),
// mapped onto the seven units with reuse: one Splitter, Constant and Multiplier serve all three
// taps and one Adder serves both sums. The timer then starts one schedule period every PERIOD
// cycles; each period the ADC converts the analog level set by the testbench, and the filter
// output must appear at the output FIFO. Every output is compared with the formula above,
// worked out here from the analog levels. Half-way the testbench changes a coefficient through
// the network while the filter runs. It then stops the timer, reconfigures the same units as a
// two-coefficient filter (two uses of splitter, constant and multiplier, one of the adder) and
// runs that too. The test also counts the mechanisms the design has and
// fails if one never happened: configuration writes, unit reuse (index wrap), multi-output
// sends, bus arbitration waits, complete power-down of a unit, execution with the wrapper
// configuration powered down, and the power states of the flash-based execution sequence.
module tb_dfp_processor;
  import dfp_pkg::*;

  localparam int unsigned AB = 4, DW = 11;
  localparam int unsigned PERIOD = 150;        // schedule period in cycles
  localparam int unsigned NSAMP  = 12;
  localparam int unsigned SHIFT  = 7;
  localparam int unsigned THRESH = 1000;
  localparam int unsigned NCMP   = 8;
  localparam int unsigned NSAMP2 = 6;          // samples of the 2-coefficient filter

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    net_in_valid = 1'b0, net_in_ready;
  logic [PACKET_WIDTH-1:0] net_in_packet = '0;
  logic                    net_out_valid, net_out_ready = 1'b1;
  logic [DW-1:0]           net_out_data, adc_dac_code;
  logic                    adc_comp;
  pwr_state_t              pwr_state [9];
  logic [15:0]             busy_cycles [9], free_cycles [9], exec_count [9], dropped [9];
  logic                    bus_busy, bus_collision, out_ovr;
  in_fifo_pwr_t            in_fifo_pwr;
  out_fifo_pwr_t           out_fifo_pwr;
  logic [15:0]             bus_grant_waits;

  dfp_processor dut (
    .clk, .rst_n, .net_in_valid, .net_in_ready, .net_in_packet,
    .net_out_valid, .net_out_ready, .net_out_data, .adc_dac_code, .adc_comp,
    .pwr_clear(1'b0), .pwr_state, .busy_cycles, .free_cycles, .exec_count, .dropped,
    .in_fifo_pwr, .out_fifo_pwr, .bus_busy, .bus_collision,
    .bus_grant_waits, .out_fifo_overrun(out_ovr)
  );

  // Analog side: the input level on an 11-bit scale, compared with the DAC level.
  int unsigned vin = 0;
  assign adc_comp = (vin >= adc_dac_code);

  int checks = 0, failures = 0;
  int unsigned xs [$];           // converted samples, oldest first
  int unsigned expected [$];      // outputs due at the output FIFO, in order
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- packet builders
  function automatic logic [15:0] wr_pkt(int addr, int wrb, int r, int v);
    int vw = 14 - AB - wrb;
    logic [15:0] p;
    p = 16'(addr) << 12;
    p[11] = 1'b1;                       // configuration event
    p[10] = 1'b1;                       // wrapper configuration
    p = p | (16'(r) << vw) | 16'(v & ((1 << vw) - 1));
    return p;
  endfunction
  function automatic logic [15:0] int_pkt(int addr, int ib, int r, int v);
    int vw = 14 - AB - ib;
    logic [15:0] p;
    p = 16'(addr) << 12;
    p[11] = 1'b1;
    p[10] = 1'b0;                       // internal configuration
    p = p | (16'(r) << vw) | 16'(v & ((1 << vw) - 1));
    return p;
  endfunction

  // Offer one packet to the input FIFO; inputs change on the falling edge, so the packet is
  // taken at the next rising edge whenever net_in_ready is high.
  task automatic send(logic [15:0] p);
    @(negedge clk);
    while (!net_in_ready) @(negedge clk);
    net_in_packet = p;
    net_in_valid  = 1'b1;
    @(negedge clk);
    net_in_valid  = 1'b0;
  endtask

  // wrapper: ready flag, reuse count, then (dest, delay) per use and output
  task automatic cfg_unit(int addr, int wrb, int reuse, int dests[$], int delays[$]);
    send(wr_pkt(addr, wrb, 1, reuse));
    foreach (dests[k]) begin
      send(wr_pkt(addr, wrb, 2 + 2 * k, dests[k]));
      send(wr_pkt(addr, wrb, 3 + 2 * k, delays[k]));
    end
  endtask

  int coef [3] = '{26, 13, 64};     // 0.2, 0.1, 0.5 in units of 1/128

  task automatic set_coef(int i, int c);
    send(int_pkt(4, 3, 2 * i, c & 127));
    send(int_pkt(4, 3, 2 * i + 1, c >> 7));
  endtask

  task automatic configure();
    // Timer (addr 0): period from two 8-bit registers, tick to the ADC.
    send(int_pkt(0, 2, 0, PERIOD & 255));
    send(int_pkt(0, 2, 1, PERIOD >> 8));
    cfg_unit(0, 3, 1, '{1}, '{0});
    // ADC (addr 1): 8-bit resolution, sample to the delay generator.
    send(int_pkt(1, 3, 0, 8));
    cfg_unit(1, 3, 1, '{2}, '{0});
    // Delay generator (addr 2): taps x[n], x[n-1], x[n-2] to the splitter, spaced in time.
    cfg_unit(2, 3, 1, '{3, 3, 3}, '{0, 24, 48});
    // Splitter (addr 3), three uses: each copy to the constant unit and multiplier operand A.
    cfg_unit(3, 4, 3, '{4, 5, 4, 5, 4, 5}, '{0, 0, 0, 0, 0, 0});
    // Constant (addr 4), three uses: coefficient i to multiplier operand B.
    for (int i = 0; i < 3; i++) set_coef(i, coef[i]);
    cfg_unit(4, 3, 3, '{6, 6, 6}, '{0, 0, 0});
    // Multiplier (addr 5/6), three uses: shift 7; products to adder A, B, B.
    for (int i = 0; i < 3; i++) send(int_pkt(5, 3, 2 * i, SHIFT));
    cfg_unit(5, 3, 3, '{7, 8, 8}, '{0, 0, 0});
    // Adder (addr 7/8), two uses: partial sum back to its own operand A, then to the output FIFO.
    cfg_unit(7, 3, 2, '{7, 9}, '{0, 0});
    // Ready flags last, timer last of all so the period starts with everything configured.
    send(wr_pkt(1, 3, 0, 1));
    send(wr_pkt(2, 3, 0, 1));
    send(wr_pkt(3, 4, 0, 1));
    send(wr_pkt(4, 3, 0, 1));
    send(wr_pkt(5, 3, 0, 1));
    send(wr_pkt(7, 3, 0, 1));
    // Subtractor (addr 10/11) difference to the comparator (addr 12), whose 0/1 verdict
    // against THRESH goes to the output FIFO.
    cfg_unit(10, 3, 1, '{12}, '{0});
    send(int_pkt(12, 3, 0, THRESH & 127));
    send(int_pkt(12, 3, 1, THRESH >> 7));
    cfg_unit(12, 3, 1, '{9}, '{2});
    send(wr_pkt(10, 3, 0, 1));
    send(wr_pkt(12, 3, 0, 1));
  endtask

  function automatic logic [15:0] data_pkt(int addr, int v);
    return (16'(addr) << 12) | 16'(v & ((1 << DW) - 1));
  endfunction

  // Threshold detection through the network: |a - b| style difference, then a compare.
  task automatic run_compare(int n);
    for (int i = 0; i < n; i++) begin
      int unsigned a, b, d;
      a = $urandom_range(2047);
      b = $urandom_range(2047);
      d = (a - b) & ((1 << DW) - 1);
      expected.push_back(d > THRESH ? 1 : 0);
      send(data_pkt(11, b));
      send(data_pkt(10, a));
      repeat (10) @(posedge clk);
    end
  endtask

  // ---------------------------------------------------------------- reference model

  function automatic int unsigned prod(int unsigned x, int unsigned c);
    return ((x * c) >> SHIFT) & ((1 << DW) - 1);
  endfunction

  // The ADC samples when the timer ticks; record the level it converts.
  int tick_count = 0;
  int ntaps = 3;
  always @(posedge clk) begin
    if (dut.g_fu[0].u_fu.load) begin
      int unsigned x, n, y;
      x = vin >> (DW - 8);
      xs.push_back(x);
      n = xs.size();
      y = prod(x, coef[0]);
      if (n > 1) y += prod(xs[n-2], coef[1]);
      if (n > 2 && ntaps == 3) y += prod(xs[n-3], coef[2]);
      expected.push_back(y & ((1 << DW) - 1));
      tick_count++;
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_cfg = 0, n_wrap = 0, n_multi = 0, n_off = 0, n_wr_off_exec = 0;
  int n_st_cfg = 0, n_st_listen = 0, n_st_out_only = 0, n_st_int_only = 0;
  int n_if_idle = 0, n_if_store = 0, n_if_send = 0, n_of_listen = 0, n_of_take = 0, n_of_net = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_fu[3].u_fu.wr_write || dut.g_fu[4].u_fu.int_write) n_cfg++;
    if (dut.g_fu[5].u_fu.load && dut.g_fu[5].u_fu.cfg_idx == 2) n_wrap++;
    if (dut.g_fu[2].u_fu.load && (&dut.g_fu[2].u_fu.out_reg_active)) n_multi++;
    if (pwr_state[6] == 4'b0000) n_off++;
    if (pwr_state[5].int_on && !pwr_state[5].wr_on) n_wr_off_exec++;
    if (pwr_state[6] == 4'b1100) n_st_cfg++;
    if (pwr_state[6] == 4'b1000) n_st_listen++;
    if (pwr_state[6] == 4'b0001) n_st_out_only++;
    if (pwr_state[5] == 4'b0010) n_st_int_only++;
    // input FIFO (network, internal, bus) and output FIFO (bus input, internal, network out)
    if (in_fifo_pwr == 3'b100) n_if_idle++;
    if (in_fifo_pwr == 3'b110) n_if_store++;
    if (in_fifo_pwr == 3'b111) n_if_send++;
    if (out_fifo_pwr == 3'b100) n_of_listen++;
    if (out_fifo_pwr == 3'b110) n_of_take++;
    if (out_fifo_pwr == 3'b011) n_of_net++;
    if (bus_collision) begin
      failures++;
      $display("FAIL: bus collision");
    end
  end

  // ---------------------------------------------------------------- output checking
  int got = 0, n3 = 0, n2 = 0;
  always @(posedge clk) if (rst_n && net_out_valid && net_out_ready) begin
    if (got < expected.size())
      check(net_out_data == DW'(expected[got]),
            $sformatf("output %0d: got %0d expected %0d", got, net_out_data, expected[got]));
    else
      check(1'b0, "output with no matching sample");
    got++;
  end

  always @(posedge clk) if ($test$plusargs("trace") && bus_busy) $display("%0t bus %h", $time, dut.bus_data);
  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (PERIOD * (NSAMP + NSAMP2 + 10) + 6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // while unconfigured every unit must be completely powered down
    for (int u = 0; u < 9; u++) check(pwr_state[u] == '0, $sformatf("unit %0d off at start", u));
    configure();
    run_compare(NCMP);
    repeat (20) @(posedge clk);
    check(got == NCMP, $sformatf("comparator results received %0d of %0d", got, NCMP));
    send(wr_pkt(0, 3, 0, 1));          // start the timer: the filter runs from here
    for (int s = 0; s < NSAMP; s++) begin
      vin = $urandom_range(2047);
      @(posedge dut.g_fu[0].u_fu.load);        // this period's tick
      @(posedge clk);
      if (s == NSAMP / 2) begin
        // an asynchronous change from the network while the filter runs
        coef[1] = 40;
        fork set_coef(1, 40); join_none
      end
      repeat (PERIOD / 2) @(posedge clk);
    end
    send(wr_pkt(0, 3, 0, 0));         // stop the timer and let the last period finish
    repeat (2 * PERIOD) @(posedge clk);
    check(got == tick_count + NCMP, $sformatf("3-tap outputs received %0d of %0d", got,
                                              tick_count + NCMP));
    n3 = tick_count;
    // Reconfigure the same units for a 2-coefficient filter: two uses of the splitter, constant
    // and multiplier, one use of the adder; the third delay tap goes to an unused address.
    ntaps = 2;
    cfg_unit(2, 3, 1, '{3, 3, 13}, '{0, 24, 48});
    send(wr_pkt(3, 4, 1, 2));
    send(wr_pkt(4, 3, 1, 2));
    cfg_unit(5, 3, 2, '{7, 8}, '{0, 0});
    cfg_unit(7, 3, 1, '{9}, '{0});
    send(wr_pkt(0, 3, 0, 1));
    for (int s = 0; s < NSAMP2; s++) begin
      vin = $urandom_range(2047);
      @(posedge dut.g_fu[0].u_fu.load);
      repeat (PERIOD / 2) @(posedge clk);
    end
    send(wr_pkt(0, 3, 0, 0));
    repeat (2 * PERIOD) @(posedge clk);
    n2 = tick_count - n3;
    check(got == tick_count + NCMP && tick_count >= NSAMP,
          $sformatf("outputs received %0d, periods started %0d", got, tick_count));
    for (int u = 0; u < 9; u++) check(dropped[u] == 0, $sformatf("unit %0d dropped %0d", u, dropped[u]));
    check(!out_ovr, "output FIFO overrun");
    check(n2 >= NSAMP2, $sformatf("2-tap periods %0d", n2));
    check(exec_count[5] == 16'(3 * n3 + 2 * n2), "multiplier ran three (two) times per sample");
    check(exec_count[6] == 16'(2 * n3 + n2), "adder ran twice (once) per sample");
    check(exec_count[7] == NCMP && exec_count[8] == NCMP, "subtractor and comparator ran");
    check(free_cycles[6] > busy_cycles[6], "adder mostly powered down");
    $display("mechanisms: cfg=%0d reuse_wraps=%0d multi_out=%0d bus_waits=%0d off=%0d wr_off_exec=%0d",
             n_cfg, n_wrap, n_multi, bus_grant_waits, n_off, n_wr_off_exec);
    $display("adder states: cfg(ON,ON,OFF,OFF)=%0d listen(ON,OFF,OFF,OFF)=%0d out(OFF,OFF,OFF,ON)=%0d; mult int-only=%0d",
             n_st_cfg, n_st_listen, n_st_out_only, n_st_int_only);
    $display("adder busy/free cycles %0d/%0d", busy_cycles[6], free_cycles[6]);
    check(n_cfg > 0, "configuration writes happened");
    check(n_wrap > 0, "reuse index reached its last use");
    check(n_multi > 0, "multi-output send happened");
    check(bus_grant_waits > 0, "bus arbitration wait happened");
    check(n_off > 0, "complete power-down happened");
    check(n_wr_off_exec > 0, "execution with wrapper powered down happened");
    check(n_st_cfg > 0 && n_st_listen > 0 && n_st_out_only > 0 && n_st_int_only > 0,
          "flash execution-sequence power states seen");
    $display("FIFO states: in %0d/%0d/%0d out %0d/%0d/%0d", n_if_idle, n_if_store, n_if_send,
             n_of_listen, n_of_take, n_of_net);
    check(n_if_idle > 0 && n_if_store > 0 && n_if_send > 0, "input FIFO power states seen");
    check(n_of_listen > 0 && n_of_take > 0 && n_of_net > 0, "output FIFO power states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
