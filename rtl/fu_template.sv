// fu_template: parameterized functional unit of the data-flow processor.
//
// A functional unit is an internal module (chosen by FU_KIND) plugged into a wrapper made of
// input bus-interfaces, wrapper configuration, internal configuration and output
// bus-interfaces, plus a power manager. The unit has no program: it runs whenever all of its
// operands have arrived as data events, and sends each result to the destination and on the
// cycle that its wrapper configuration gives. This structure, the MOD_ID / ADDRESS_BITS /
// WR_CONFIG_BITS / INT_CONFIG_BITS / reuse parameters and their defaults follow the described
// template.
//
// This design's own choices:
//  * Operand i arrives at its own input bus-interface with address MOD_ID + i, so a
//    two-operand unit occupies two consecutive addresses and operand order never depends on
//    arrival order. Configuration events are taken only at address MOD_ID; data events to a
//    unit without operands (the timer) and configuration events to MOD_ID + i (i > 0) are
//    discarded.
//  * Reuse: the unit keeps an execution index that selects which destinations, delays and
//    internal settings apply; it advances after each execution and wraps after the reuse count
//    (wrapper register 1, 0 or 1 meaning no reuse) or NUM_REUSE.
//  * The internal module starts only when every output register is free, so a result is
//    always handed to the output bus-interfaces in the cycle it is ready.
//  * A unit executes only while wrapper register 0 bit 0 (ready for operation) is set.
// Ports: the event bus in (bus_busy, bus_data); one request/grant/driver set per output
// register; the ADC's analog comparator link (used only when FU_KIND is FU_ADC); power state
// and cycle counters; exec_count counts executions; dropped counts results lost because the
// unit was not free (timer ticks only) and overrun input packets that arrived while the
// previous one was still unused.
module fu_template
  import dfp_pkg::*;
#(
  parameter fu_kind_e    FU_KIND         = FU_ADDER,
  parameter int unsigned MOD_ID          = 0,
  parameter int unsigned ADDRESS_BITS    = 4,
  parameter int unsigned BUS_WIDTH       = 16,
  parameter int unsigned WR_CONFIG_BITS  = 3,
  parameter int unsigned INT_CONFIG_BITS = 3,
  parameter int unsigned NUM_OPERANDS    = 2,
  parameter int unsigned NUM_OUTPUTS     = 1,
  parameter int unsigned NUM_REUSE       = 3,
  parameter bit          FLASH_CONFIG    = 1'b1,
  localparam int unsigned DW  = data_width(ADDRESS_BITS),
  localparam int unsigned CW  = cfg_width(ADDRESS_BITS),
  localparam int unsigned WVW = cfg_value_width(ADDRESS_BITS, WR_CONFIG_BITS),
  localparam int unsigned IVW = cfg_value_width(ADDRESS_BITS, INT_CONFIG_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bus_busy,
  input  logic [BUS_WIDTH-1:0] bus_data,
  output logic [NUM_OUTPUTS-1:0] out_req,
  input  logic [NUM_OUTPUTS-1:0] out_grant,
  output logic [NUM_OUTPUTS-1:0] out_busy,
  output logic [BUS_WIDTH-1:0] out_data [NUM_OUTPUTS],
  output logic [DW-1:0]        adc_dac_code,
  input  logic                 adc_comp,
  input  logic                 pwr_clear,
  output pwr_state_t           pwr_state,
  output logic [15:0]          busy_cycles,
  output logic [15:0]          free_cycles,
  output logic [15:0]          exec_count,
  output logic [15:0]          dropped
);
  localparam int unsigned NIN = (NUM_OPERANDS > 0) ? NUM_OPERANDS : 1;
  localparam int unsigned IW  = (NUM_REUSE > 1) ? $clog2(NUM_REUSE) : 1;

  if (MOD_ID + NIN > (1 << ADDRESS_BITS)) begin : g_check1
    $error("unit addresses do not fit in ADDRESS_BITS");
  end
  if (NUM_OPERANDS > 2) begin : g_check2
    $error("internal modules take at most two operands");
  end

  // ---------------------------------------------------------------- input bus-interfaces
  logic [DW-1:0]  op_data  [NIN];
  logic [NIN-1:0] op_ready, op_used, in_active, in_overrun;
  logic [CW-1:0]  wr_pkt, int_pkt;
  logic           wr_rdy, wr_used, int_rdy, int_used;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    logic [CW-1:0] wp, ip;
    logic          wrr, irr;
    input_bus_if #(
      .MOD_ID(MOD_ID + i), .ADDRESS_BITS(ADDRESS_BITS), .BUS_WIDTH(BUS_WIDTH)
    ) u_in (
      .clk, .rst_n, .bus_busy, .bus_data,
      .inp_data_packet(op_data[i]), .inp_data_ready(op_ready[i]), .inp_data_used(op_used[i]),
      .wr_config_packet(wp), .wr_config_ready(wrr),
      .wr_config_used(i == 0 ? wr_used : wrr),
      .int_config_packet(ip), .int_config_ready(irr),
      .int_config_used(i == 0 ? int_used : irr),
      .overrun(in_overrun[i]), .active(in_active[i])
    );
    if (i == 0) begin : g_cfg
      assign wr_pkt  = wp;
      assign wr_rdy  = wrr;
      assign int_pkt = ip;
      assign int_rdy = irr;
    end
  end

  // ---------------------------------------------------------------- configuration
  logic [IW-1:0]           cfg_idx;
  logic [ADDRESS_BITS-1:0] dest  [NUM_OUTPUTS];
  logic [WVW-1:0]          delay [NUM_OUTPUTS];
  logic [NUM_OUTPUTS-1:0]  out_reg_active;
  logic                    module_active;
  logic [WVW-1:0]          reuse_count;
  logic                    wr_write, int_write;
  logic [IVW-1:0]          ival [2];

  wrapper_config #(
    .ADDRESS_BITS(ADDRESS_BITS), .WR_CONFIG_BITS(WR_CONFIG_BITS),
    .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_REUSE(NUM_REUSE)
  ) u_wrapper (
    .clk, .rst_n,
    .wr_config_packet(wr_pkt), .wr_config_ready(wr_rdy), .wr_config_used(wr_used),
    .config_index(cfg_idx), .destination_addresses(dest), .delay_values(delay),
    .out_reg_active, .module_active, .reuse_count, .cfg_write(wr_write)
  );

  internal_config #(
    .ADDRESS_BITS(ADDRESS_BITS), .INT_CONFIG_BITS(INT_CONFIG_BITS),
    .NUM_REUSE(NUM_REUSE), .INT_VALUES(2)
  ) u_internal_cfg (
    .clk, .rst_n,
    .int_config_packet(int_pkt), .int_config_ready(int_rdy), .int_config_used(int_used),
    .config_index(cfg_idx), .int_config_value(ival), .cfg_write(int_write)
  );

  wire [2*IVW-1:0] wide_val = {ival[1], ival[0]};

  // ---------------------------------------------------------------- execution control
  logic [NUM_OUTPUTS-1:0] out_idle;
  logic                   outs_idle, running, start, done;
  logic [DW-1:0]          res [NUM_OUTPUTS];
  logic [DW-1:0]          opa, opb;

  assign outs_idle = &out_idle;
  assign opa = op_data[0];
  assign opb = op_data[NIN-1];

  if (NUM_OPERANDS > 0) begin : g_ops
    assign start   = module_active && (&op_ready) && !running && outs_idle;
    assign op_used = start ? '1 : '0;
  end else begin : g_no_ops
    assign start   = 1'b0;
    assign op_used = op_ready;      // data events to an operand-less unit are discarded
  end

  wire load = done && outs_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      cfg_idx    <= '0;
      exec_count <= '0;
      dropped    <= '0;
    end else begin
      if (start) running <= 1'b1;
      else if (done) running <= 1'b0;
      if (load) begin
        exec_count <= exec_count + 1'b1;
        if (reuse_count <= WVW'(1) || WVW'(cfg_idx) + 1'b1 >= reuse_count
            || int'(cfg_idx) + 1 >= NUM_REUSE)
          cfg_idx <= '0;
        else
          cfg_idx <= cfg_idx + 1'b1;
      end
      if ((done && !outs_idle) || |in_overrun) dropped <= dropped + 1'b1;
    end
  end

  // ---------------------------------------------------------------- internal module
  logic int_busy;
  if (FU_KIND == FU_ADC) begin : g_adc
    logic [DW-1:0] r;
    fu_adc #(.DATA_W(DW), .RES_W(IVW)) u_im (
      .clk, .rst_n, .start, .resolution(ival[0]), .dac_code(adc_dac_code), .comp(adc_comp),
      .busy(int_busy), .done, .result(r)
    );
    for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_r
      assign res[k] = r;
    end
  end else begin : g_digital
    assign adc_dac_code = '0;
    assign int_busy     = running;
    if (FU_KIND == FU_TIMER) begin : g_timer
      logic [DW-1:0] r;
      fu_timer #(.DATA_W(DW), .PERIOD_W(2*IVW)) u_im (
        .clk, .rst_n, .enable(module_active), .period(wide_val), .done, .result(r)
      );
      for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_r
        assign res[k] = r;
      end
    end else if (FU_KIND == FU_SPLITTER) begin : g_split
      fu_splitter #(.DATA_W(DW), .NUM_OUTPUTS(NUM_OUTPUTS)) u_im (
        .clk, .rst_n, .start, .a(opa), .done, .result(res)
      );
    end else if (FU_KIND == FU_DELAY) begin : g_delay
      fu_delay #(.DATA_W(DW), .NUM_OUTPUTS(NUM_OUTPUTS)) u_im (
        .clk, .rst_n, .start, .a(opa), .done, .result(res)
      );
    end else begin : g_single
      logic [DW-1:0] r;
      if (FU_KIND == FU_ADDER) begin : g_add
        fu_adder #(.DATA_W(DW)) u_im (.clk, .rst_n, .start, .a(opa), .b(opb), .done, .result(r));
      end else if (FU_KIND == FU_SUBTRACTOR) begin : g_sub
        fu_subtractor #(.DATA_W(DW)) u_im (.clk, .rst_n, .start, .a(opa), .b(opb), .done,
                                           .result(r));
      end else if (FU_KIND == FU_MULTIPLIER) begin : g_mul
        logic mbusy;
        fu_multiplier #(.DATA_W(DW), .SHIFT_W(IVW)) u_im (
          .clk, .rst_n, .start, .a(opa), .b(opb), .shift(ival[0]), .busy(mbusy), .done,
          .result(r)
        );
      end else if (FU_KIND == FU_CONSTANT) begin : g_const
        fu_constant #(.DATA_W(DW)) u_im (.clk, .rst_n, .start, .value(DW'(wide_val)), .done,
                                         .result(r));
      end else begin : g_cmp
        fu_comparator #(.DATA_W(DW)) u_im (.clk, .rst_n, .start, .a(opa),
                                           .threshold(DW'(wide_val)), .done, .result(r));
      end
      for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_r
        assign res[k] = r;
      end
    end
  end

  // ---------------------------------------------------------------- output bus-interfaces
  for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_out
    output_bus_if #(
      .ADDRESS_BITS(ADDRESS_BITS), .DELAY_W(WVW), .BUS_WIDTH(BUS_WIDTH)
    ) u_out (
      .clk, .rst_n, .load, .data(res[k]), .dest(dest[k]), .delay(delay[k]),
      .out_active(out_reg_active[k]), .idle(out_idle[k]),
      .req(out_req[k]), .grant(out_grant[k]), .drv_busy(out_busy[k]), .drv_data(out_data[k]),
      .sent()
    );
  end

  // ---------------------------------------------------------------- power manager
  logic [15:0] pm_busy, pm_free;
  power_manager #(.FLASH_CONFIG(FLASH_CONFIG)) u_pm (
    .clk, .rst_n, .clear(pwr_clear),
    .in_active(|in_active || start),
    .cfg_write(wr_write || int_write),
    .cfg_read(load),
    .int_active(start || running || int_busy),
    .out_active(!outs_idle || load),
    .state(pwr_state), .off_complete(), .busy_cycles(pm_busy), .free_cycles(pm_free)
  );
  assign busy_cycles = pm_busy;
  assign free_cycles = pm_free;
endmodule
