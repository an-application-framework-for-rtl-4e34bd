// dfp_processor: a data-flow processor instance for sensing and filtering applications.
//
// There is no instruction stream and no central controller. Nine functional units share one
// event bus with an input FIFO from the network and an output FIFO to it: the unit set of the
// filter architecture (Timer, ADC, Delay-generator, Splitter, Constant, Multiplier, Adder) plus
// the Subtractor and Comparator of the free-fall-detector architecture. Units an application
// does not use stay powered down. The network first sends configuration events through the
// input FIFO: for every unit its "ready" flag, how often it is reused per schedule period, and
// for each use and output register a destination address and a send delay, plus unit settings
// (timer period, ADC resolution, coefficients, shifts). After that the units run on their own:
// the timer ticks, the ADC converts, and every data event flows from unit to unit along the
// configured destinations until a result reaches the output FIFO.
//
// The unit set, the single bus, the two FIFOs and the 16-bit packet follow the architecture.
// This design's own choices are the unit addresses,
//   0 Timer    1 ADC    2 Delay-generator    3 Splitter    4 Constant
//   5 Multiplier operand A    6 Multiplier operand B    7 Adder operand A    8 Adder operand B
//   9 output FIFO    10 Subtractor operand A    11 Subtractor operand B    12 Comparator,
// the bus priority (lowest first: Timer, ADC, Delay x3, Splitter x2, Constant, Multiplier,
// Adder, Subtractor, Comparator, input FIFO) and the per-unit sizes in the table below.
// The ADC's analog part (comparator, DAC) sits outside: adc_dac_code out, adc_comp in.
// Each unit reports its power state (input, wrapper, internal, output domains on), its
// busy/free cycle counts, its executions and lost events; the two FIFOs report their domain
// enables too; FLASH_CONFIG selects the flash-based
// power-down of the wrapper registers (1) or an always-powered wrapper (0). bus_collision is a
// checker output: the arbiter never grants two drivers, so synthesis reduces it to 0.
// Network side: valid/ready on both FIFOs, one 16-bit packet in or one data value out per cycle.
module dfp_processor
  import dfp_pkg::*;
#(
  parameter int unsigned ADDRESS_BITS = 4,
  parameter int unsigned BUS_WIDTH    = 16,
  parameter int unsigned FIFO_DEPTH   = 8,
  parameter bit          FLASH_CONFIG = 1'b1,
  localparam int unsigned DW     = data_width(ADDRESS_BITS),
  localparam int unsigned N_FU   = 9,
  localparam int unsigned N_DRV  = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    net_in_valid,
  output logic                    net_in_ready,
  input  logic [PACKET_WIDTH-1:0] net_in_packet,
  output logic                    net_out_valid,
  input  logic                    net_out_ready,
  output logic [DW-1:0]           net_out_data,
  output logic [DW-1:0]           adc_dac_code,
  input  logic                    adc_comp,
  input  logic                    pwr_clear,
  output pwr_state_t              pwr_state   [N_FU],
  output logic [15:0]             busy_cycles [N_FU],
  output logic [15:0]             free_cycles [N_FU],
  output logic [15:0]             exec_count  [N_FU],
  output logic [15:0]             dropped     [N_FU],
  output in_fifo_pwr_t            in_fifo_pwr,
  output out_fifo_pwr_t           out_fifo_pwr,
  output logic                    bus_busy,
  output logic                    bus_collision,
  output logic [15:0]             bus_grant_waits,
  output logic                    out_fifo_overrun
);
  localparam int unsigned A_TIMER = 0, A_ADC = 1, A_DELAY = 2, A_SPLIT = 3, A_CONST = 4,
                          A_MULT = 5, A_ADDER = 7, A_OUTFIFO = 9,
                          A_SUB = 10, A_COMP = 12;

  logic [BUS_WIDTH-1:0] bus_data;
  logic [N_DRV-1:0]     req, grant, drv_busy;
  logic [BUS_WIDTH-1:0] drv_data [N_DRV];
  logic [DW-1:0]        unused_dac [N_FU];

  event_bus #(.N_DRV(N_DRV), .BUS_WIDTH(BUS_WIDTH)) u_bus (
    .clk, .rst_n, .req, .grant, .drv_busy, .drv_data,
    .bus_busy, .bus_data, .collision(bus_collision), .grant_waits(bus_grant_waits)
  );

  // Functional units, one table row per unit: kind, address, operands, output registers,
  // reuse, wrapper and internal register-address widths, first bus driver index.
  // Splitter: 3 uses x 2 outputs need 14 wrapper registers, hence WR_CONFIG_BITS = 4.
  // Timer: a 16-bit period from two 8-bit internal registers, hence INT_CONFIG_BITS = 2.
  localparam fu_kind_e    KIND [N_FU] = '{FU_TIMER, FU_ADC, FU_DELAY, FU_SPLITTER, FU_CONSTANT,
                                          FU_MULTIPLIER, FU_ADDER, FU_SUBTRACTOR, FU_COMPARATOR};
  localparam int unsigned ADDR [N_FU] = '{A_TIMER, A_ADC, A_DELAY, A_SPLIT, A_CONST, A_MULT,
                                          A_ADDER, A_SUB, A_COMP};
  localparam int unsigned NOPS [N_FU] = '{0, 1, 1, 1, 1, 2, 2, 2, 1};
  localparam int unsigned NOUT [N_FU] = '{1, 1, 3, 2, 1, 1, 1, 1, 1};
  localparam int unsigned NRE  [N_FU] = '{1, 1, 1, 3, 3, 3, 3, 3, 3};
  localparam int unsigned WRB  [N_FU] = '{3, 3, 3, 4, 3, 3, 3, 3, 3};
  localparam int unsigned INTB [N_FU] = '{2, 3, 3, 3, 3, 3, 3, 3, 3};
  localparam int unsigned DRV  [N_FU] = '{0, 1, 2, 5, 7, 8, 9, 10, 11};

  for (genvar u = 0; u < N_FU; u++) begin : g_fu
    fu_template #(
      .FU_KIND(KIND[u]), .MOD_ID(ADDR[u]), .ADDRESS_BITS(ADDRESS_BITS), .BUS_WIDTH(BUS_WIDTH),
      .WR_CONFIG_BITS(WRB[u]), .INT_CONFIG_BITS(INTB[u]), .NUM_OPERANDS(NOPS[u]),
      .NUM_OUTPUTS(NOUT[u]), .NUM_REUSE(NRE[u]), .FLASH_CONFIG(FLASH_CONFIG)
    ) u_fu (
      .clk, .rst_n, .bus_busy, .bus_data,
      .out_req(req[DRV[u] +: NOUT[u]]), .out_grant(grant[DRV[u] +: NOUT[u]]),
      .out_busy(drv_busy[DRV[u] +: NOUT[u]]), .out_data(drv_data[DRV[u] +: NOUT[u]]),
      .adc_dac_code(unused_dac[u]), .adc_comp, .pwr_clear,
      .pwr_state(pwr_state[u]), .busy_cycles(busy_cycles[u]),
      .free_cycles(free_cycles[u]), .exec_count(exec_count[u]), .dropped(dropped[u])
    );
  end

  assign adc_dac_code = unused_dac[1];

  input_fifo #(.BUS_WIDTH(BUS_WIDTH), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .net_valid(net_in_valid), .net_ready(net_in_ready), .net_packet(net_in_packet),
    .req(req[12]), .grant(grant[12]), .drv_busy(drv_busy[12]), .drv_data(drv_data[12]),
    .pwr_state(in_fifo_pwr), .count()
  );

  output_fifo #(
    .MOD_ID(A_OUTFIFO), .ADDRESS_BITS(ADDRESS_BITS), .BUS_WIDTH(BUS_WIDTH), .DEPTH(FIFO_DEPTH)
  ) u_out_fifo (
    .clk, .rst_n, .bus_busy, .bus_data,
    .net_valid(net_out_valid), .net_ready(net_out_ready), .net_data(net_out_data),
    .pwr_state(out_fifo_pwr), .overrun(out_fifo_overrun)
  );
endmodule
