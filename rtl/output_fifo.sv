// output_fifo: output FIFO between the event bus and the high-speed network.
//
// Data events addressed to MOD_ID are taken from the event bus by an input bus-interface,
// buffered in a DEPTH-entry FIFO and offered to the network (valid/ready, one data value per
// transfer). This is how an application's results leave the processor. If the FIFO is full the
// event stays in the bus-interface until there is room. Configuration events addressed to the
// FIFO are discarded. Depth, handshake and the discarding are this design's choice.
// pwr_state gives the enables of three power domains, following the output-FIFO power states
// of the architecture: the bus input (on while a packet is on the bus or one is held), the
// storage (on while it holds values or takes one) and the network output (on while a value is
// offered). Listening, taking an event and sending to the network then give the states
// (ON, OFF, OFF), (ON, ON, OFF) and (OFF, ON, ON), written as (bus input, internal, network
// output). What switches each domain is this design's reading.
module output_fifo
  import dfp_pkg::*;
#(
  parameter int unsigned MOD_ID       = 9,
  parameter int unsigned ADDRESS_BITS = 4,
  parameter int unsigned BUS_WIDTH    = 16,
  parameter int unsigned DEPTH        = 8,
  localparam int unsigned DW = data_width(ADDRESS_BITS),
  localparam int unsigned CW = cfg_width(ADDRESS_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bus_busy,
  input  logic [BUS_WIDTH-1:0] bus_data,
  output logic                 net_valid,
  input  logic                 net_ready,
  output logic [DW-1:0]        net_data,
  output out_fifo_pwr_t        pwr_state,
  output logic                 overrun
);
  logic [DW-1:0] d;
  logic [CW-1:0] wp, ip;
  logic          d_rdy, d_used, wr_rdy, int_rdy, in_active, full, empty;

  input_bus_if #(.MOD_ID(MOD_ID), .ADDRESS_BITS(ADDRESS_BITS), .BUS_WIDTH(BUS_WIDTH)) u_in (
    .clk, .rst_n, .bus_busy, .bus_data,
    .inp_data_packet(d), .inp_data_ready(d_rdy), .inp_data_used(d_used),
    .wr_config_packet(wp), .wr_config_ready(wr_rdy), .wr_config_used(wr_rdy),
    .int_config_packet(ip), .int_config_ready(int_rdy), .int_config_used(int_rdy),
    .overrun, .active(in_active)
  );

  assign d_used = d_rdy && !full;

  sync_fifo #(.WIDTH(DW), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push(d_used), .wr_data(d),
    .pop(net_valid && net_ready), .rd_data(net_data),
    .full, .empty, .count()
  );

  assign net_valid = !empty;
  always_comb begin
    pwr_state.bus_in_on  = in_active;
    pwr_state.int_on     = !empty || d_used;
    pwr_state.net_out_on = !empty;
  end
endmodule
