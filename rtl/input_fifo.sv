// input_fifo: input FIFO between the high-speed network and the event bus.
//
// Packets from the network (valid/ready, one 16-bit packet per transfer) are buffered in a
// DEPTH-entry FIFO and put on the event bus one at a time through a bus_tx. The input FIFO is
// how configuration events reach the functional units and how asynchronous events from the
// network enter the processor; it decouples the fast network from the slow processor, as in
// the architecture. The FIFO sends in bus cycles the functional units leave free: it sits last
// in the bus priority order. The depth and the valid/ready network handshake are this design's
// choice. count is the occupancy.
//
// pwr_state gives the enables of three power domains: the network interface (always on), the
// packet storage (on while it holds packets or one is being written) and the bus interface (on
// while a packet is being sent). They produce the first three input-FIFO power states of the
// architecture's configuration phase: (ON, OFF, OFF), (ON, ON, OFF), (ON, ON, ON), written as
// (network interface, internal, bus interface). The FIFO's own configuration, packet mask and
// count-down domains of the architecture are not part of this design.
module input_fifo
  import dfp_pkg::*;
#(
  parameter int unsigned BUS_WIDTH = 16,
  parameter int unsigned DEPTH     = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    net_valid,
  output logic                    net_ready,
  input  logic [PACKET_WIDTH-1:0] net_packet,
  output logic                    req,
  input  logic                    grant,
  output logic                    drv_busy,
  output logic [BUS_WIDTH-1:0]    drv_data,
  output in_fifo_pwr_t           pwr_state,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic                    full, empty, tx_idle, tx_load;
  logic [PACKET_WIDTH-1:0] head;

  assign net_ready = !full;
  assign tx_load   = tx_idle && !empty;

  sync_fifo #(.WIDTH(PACKET_WIDTH), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push(net_valid), .wr_data(net_packet),
    .pop(tx_load), .rd_data(head),
    .full, .empty, .count
  );

  bus_tx #(.BUS_WIDTH(BUS_WIDTH)) u_tx (
    .clk, .rst_n,
    .load(tx_load), .packet(head), .idle(tx_idle),
    .req, .grant, .drv_busy, .drv_data, .done()
  );

  always_comb begin
    pwr_state.net_if_on = 1'b1;
    pwr_state.int_on    = !empty || net_valid;
    pwr_state.bus_if_on = !tx_idle;
  end
endmodule
