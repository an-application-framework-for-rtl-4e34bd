// tb_fu_template: tests one functional unit, wrapper and internal module together, as a
// Multiplier unit at address 5 with two output registers and three reuse indices.
//
// The testbench plays the event bus. It writes the wrapper configuration (a reuse count and,
// per index and output, a random destination and delay) and the internal configuration
// (a random shift per index), then sends random operand pairs to addresses 5 and 6 in random
// order. For every execution it checks that both output registers send a data event with the
// destination of the current reuse index, the value (a*b) >> shift of that index, and the first
// beat exactly delay+2 cycles after the result was loaded; the reuse index must wrap after the
// reuse count, which is changed from NUM_REUSE-1 to NUM_REUSE half-way. It also checks that
// operands wait while the ready-for-operation flag is clear,
// that configuration packets to other addresses are ignored, and that the unit's power state
// turns off between executions.
module tb_fu_template;
  import dfp_pkg::*;

  localparam int unsigned AB = 4, DW = 11, WB = 4, IB = 3, NO = 2, NR = 3, ID = 5;
  localparam int unsigned WVW = 14 - AB - WB, IVW = 14 - AB - IB;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          tb_busy = 1'b0;
  logic [15:0]   tb_data = '0;
  logic [NO-1:0] out_req, out_grant, out_busy;
  logic [15:0]   out_data [NO];
  logic [DW-1:0] dac;
  pwr_state_t    pwr_state;
  logic [15:0]   busy_cycles, free_cycles, exec_count, dropped;

  // The bus: the testbench's own packets and the unit's outputs are ORed; output 0 wins.
  wire        bus_busy = tb_busy | (|out_busy);
  wire [15:0] bus_data = tb_data | out_data[0] | out_data[1];
  assign out_grant[0] = out_req[0] && !tb_busy;
  assign out_grant[1] = out_req[1] && !out_req[0] && !tb_busy;

  fu_template #(
    .FU_KIND(FU_MULTIPLIER), .MOD_ID(ID), .ADDRESS_BITS(AB), .WR_CONFIG_BITS(WB),
    .INT_CONFIG_BITS(IB), .NUM_OPERANDS(2), .NUM_OUTPUTS(NO), .NUM_REUSE(NR)
  ) dut (
    .clk, .rst_n, .bus_busy, .bus_data, .out_req, .out_grant, .out_busy, .out_data,
    .adc_dac_code(dac), .adc_comp(1'b0), .pwr_clear(1'b0), .pwr_state, .busy_cycles,
    .free_cycles, .exec_count, .dropped
  );

  function automatic logic [15:0] cfg_pkt(int addr, bit wr, int rb, int r, int v);
    int vw = 14 - AB - rb;
    logic [15:0] p;
    p = 16'(addr) << 12;
    p[11] = 1'b1;
    p[10] = wr;
    return p | (16'(r) << vw) | 16'(v & ((1 << vw) - 1));
  endfunction

  // One single-beat packet, driven on the falling edge; waits while the unit sends.
  task automatic put(logic [15:0] p);
    @(negedge clk);
    while (|out_busy || |out_req) @(negedge clk);
    tb_busy = 1'b1;
    tb_data = p;
    @(negedge clk);
    tb_busy = 1'b0;
    tb_data = '0;
  endtask

  int reuse, dst [NR][NO], dly [NR][NO], shf [NR];
  int unsigned ea, eb;
  int load_cycle, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.load) load_cycle <= cyc;

  // Expected packets per output, with their due cycle relative to load.
  typedef struct { int dest; int value; int delay; } exp_t;
  exp_t exp_q [NO][$];
  int   got [NO] = '{0, 0};
  function automatic void expect_out(int k, int i);
    exp_t e;
    e.dest  = dst[i][k];
    e.value = int'((ea * eb) >> shf[i]) & 2047;
    e.delay = dly[i][k];
    exp_q[k].push_back(e);
  endfunction
  int   pwr_off_seen = 0;
  for (genvar k = 0; k < NO; k++) begin : g_mon
    always @(posedge clk) if (rst_n && out_busy[k]) begin
      if (exp_q[k].size() == 0) check(1'b0, $sformatf("unexpected packet on output %0d", k));
      else begin
        exp_t e;
        e = exp_q[k].pop_front();
        check(out_data[k][15:12] == 4'(e.dest) && !out_data[k][11] &&
              out_data[k][10:0] == 11'(e.value),
              $sformatf("output %0d packet %h, expected dest %0d value %0d",
                        k, out_data[k], e.dest, e.value));
        // output 1 may wait for output 0 when both are due in the same cycle
        if (k == 0 || cyc - load_cycle == e.delay + 2)
          check(cyc - load_cycle == e.delay + 2,
                $sformatf("output %0d beat %0d cycles after load, delay %0d",
                          k, cyc - load_cycle, e.delay));
        else
          check(cyc - load_cycle == e.delay + 3,
                $sformatf("output %0d beat %0d cycles after load, delay %0d (arbitrated)",
                          k, cyc - load_cycle, e.delay));
        got[k]++;
      end
    end
  end
  always @(posedge clk) if (rst_n && !pwr_state.int_on && !pwr_state.in_on) pwr_off_seen++;

  initial begin
    int idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    reuse = NR - 1;   // below NUM_REUSE first; raised to NUM_REUSE half-way
    for (int i = 0; i < NR; i++) begin
      shf[i] = $urandom_range(0, 11);
      put(cfg_pkt(ID, 1'b0, IB, 2 * i, shf[i]));
      for (int k = 0; k < NO; k++) begin
        dst[i][k] = $urandom_range(0, 15);
        dly[i][k] = (k == 0) ? $urandom_range(0, 20) : $urandom_range(22, 40);
        put(cfg_pkt(ID, 1'b1, WB, 2 + 2 * (i * NO + k), dst[i][k]));
        put(cfg_pkt(ID, 1'b1, WB, 3 + 2 * (i * NO + k), dly[i][k]));
      end
    end
    put(cfg_pkt(ID, 1'b1, WB, 1, reuse));
    // Writes to neighbouring addresses must not change this unit.
    put(cfg_pkt(ID + 2, 1'b1, WB, 2, 9));
    put(cfg_pkt(ID - 1, 1'b0, IB, 0, 1));
    // Operands before the ready flag: nothing may run.
    ea = $urandom_range(0, 2047);
    eb = $urandom_range(0, 2047);
    put({4'(ID), 1'b0, 11'(ea)});
    put({4'(ID + 1), 1'b0, 11'(eb)});
    repeat (30) @(negedge clk);
    check(exec_count == 0 && !out_req && !out_busy, "no execution while not ready");
    // Set ready: the waiting pair executes with index 0.
    for (int k = 0; k < NO; k++) expect_out(k, 0);
    put(cfg_pkt(ID, 1'b1, WB, 0, 1));
    wait (got[NO-1] == 1);
    idx = (reuse > 1) ? 1 : 0;
    for (int n = 1; n < 60; n++) begin
      if (n == 30) begin
        // reconfigure the reuse count between executions (index is 0 again after 30 runs)
        check(int'(dut.cfg_idx) == 0, "index 0 before changing the reuse count");
        reuse = NR;
        idx = 0;
        put(cfg_pkt(ID, 1'b1, WB, 1, reuse));
      end
      ea = $urandom_range(0, 2047);
      eb = (n % 4 == 0) ? 2047 : $urandom_range(0, 2047);
      for (int k = 0; k < NO; k++) expect_out(k, idx);
      if ($urandom_range(1)) begin
        put({4'(ID), 1'b0, 11'(ea)});
        repeat ($urandom_range(0, 5)) @(negedge clk);
        put({4'(ID + 1), 1'b0, 11'(eb)});
      end else begin
        put({4'(ID + 1), 1'b0, 11'(eb)});
        repeat ($urandom_range(0, 5)) @(negedge clk);
        put({4'(ID), 1'b0, 11'(ea)});
      end
      wait (got[NO-1] == n + 1);
      check(int'(dut.cfg_idx) == (idx + 1) % reuse, $sformatf("index after execution %0d", n));
      idx = (idx + 1) % reuse;
    end
    repeat (20) @(negedge clk);
    check(exec_count == 60, $sformatf("exec_count %0d", exec_count));
    check(dropped == 0, "nothing dropped");
    check(got[0] == 60 && got[1] == 60, "every result sent on both outputs");
    check(pwr_off_seen > 0, "input and internal domains off while idle");
    check(busy_cycles > 0 && free_cycles > 0, "power manager counts busy and free cycles");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
