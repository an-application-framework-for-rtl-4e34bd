// input_bus_if: input bus-interface of a functional unit.
//
// The interface watches the event bus. While bus_busy is high a packet is on the bus, one
// BUS_WIDTH-bit beat per cycle, most significant beat first; PACKET_WIDTH / BUS_WIDTH beats
// make one 16-bit packet (one beat when the bus is as wide as the packet, the default). When a
// packet is complete its leading ADDRESS_BITS bits are compared with MOD_ID and only the unit
// with that address keeps it. The event-mode bit then selects a data event (forwarded on
// inp_data_packet) or a configuration event, whose next bit selects the wrapper configuration
// (wr_config_packet) or the internal configuration (int_config_packet). All of this follows the
// described input bus-interface.
//
// Each of the three outputs is held with its *_ready flag high until the consumer pulses the
// matching *_used input; the packet is taken in the cycle *_used is high. The level/pulse
// handshake is this design's choice. A packet that arrives for an output still holding an
// unused one is dropped and reported by a one-cycle overrun pulse; a correct static schedule
// never causes it. A packet is available the cycle after its last beat was on the bus.
// active is high while a packet is on the bus or one is held: the input domain must be powered.
module input_bus_if
  import dfp_pkg::*;
#(
  parameter int unsigned MOD_ID       = 0,
  parameter int unsigned ADDRESS_BITS = 4,
  parameter int unsigned BUS_WIDTH    = 16,
  localparam int unsigned DW    = data_width(ADDRESS_BITS),
  localparam int unsigned CW    = cfg_width(ADDRESS_BITS),
  localparam int unsigned BEATS = PACKET_WIDTH / BUS_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bus_busy,
  input  logic [BUS_WIDTH-1:0] bus_data,
  output logic [DW-1:0]        inp_data_packet,
  output logic                 inp_data_ready,
  input  logic                 inp_data_used,
  output logic [CW-1:0]        wr_config_packet,
  output logic                 wr_config_ready,
  input  logic                 wr_config_used,
  output logic [CW-1:0]        int_config_packet,
  output logic                 int_config_ready,
  input  logic                 int_config_used,
  output logic                 overrun,
  output logic                 active
);
  if (PACKET_WIDTH % BUS_WIDTH != 0) begin : g_check1
    $error("BUS_WIDTH must divide the packet width");
  end
  if (MOD_ID >= (1 << ADDRESS_BITS)) begin : g_check2
    $error("MOD_ID does not fit in ADDRESS_BITS");
  end

  localparam int unsigned BCW = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [PACKET_WIDTH-1:0] shreg;
  logic [BCW-1:0]          beat;
  logic [PACKET_WIDTH-1:0] pkt;
  logic                    last_beat;

  // The packet as it stands once the current beat is shifted in.
  if (BEATS == 1) begin : g_one_beat
    assign pkt = bus_data;
  end else begin : g_beats
    assign pkt = {shreg[PACKET_WIDTH-BUS_WIDTH-1:0], bus_data};
  end
  assign last_beat = bus_busy && (beat == BCW'(BEATS - 1));

  wire hit      = last_beat && (pkt[PACKET_WIDTH-1 -: ADDRESS_BITS] == ADDRESS_BITS'(MOD_ID));
  wire is_cfg   = pkt[PACKET_WIDTH-1-ADDRESS_BITS];
  wire is_wr    = pkt[PACKET_WIDTH-2-ADDRESS_BITS];
  wire new_data = hit && !is_cfg;
  wire new_wr   = hit && is_cfg && is_wr;
  wire new_int  = hit && is_cfg && !is_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      beat  <= '0;
    end else if (bus_busy) begin
      shreg <= pkt;
      beat  <= last_beat ? '0 : beat + 1'b1;
    end else begin
      beat  <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inp_data_ready    <= 1'b0;
      wr_config_ready   <= 1'b0;
      int_config_ready  <= 1'b0;
      inp_data_packet   <= '0;
      wr_config_packet  <= '0;
      int_config_packet <= '0;
      overrun           <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (inp_data_used) inp_data_ready <= 1'b0;
      if (wr_config_used) wr_config_ready <= 1'b0;
      if (int_config_used) int_config_ready <= 1'b0;
      if (new_data) begin
        if (inp_data_ready && !inp_data_used) overrun <= 1'b1;
        else begin
          inp_data_packet <= pkt[DW-1:0];
          inp_data_ready  <= 1'b1;
        end
      end
      if (new_wr) begin
        if (wr_config_ready && !wr_config_used) overrun <= 1'b1;
        else begin
          wr_config_packet <= pkt[CW-1:0];
          wr_config_ready  <= 1'b1;
        end
      end
      if (new_int) begin
        if (int_config_ready && !int_config_used) overrun <= 1'b1;
        else begin
          int_config_packet <= pkt[CW-1:0];
          int_config_ready  <= 1'b1;
        end
      end
    end
  end

  assign active = bus_busy || inp_data_ready || wr_config_ready || int_config_ready;

  // A consumer only takes what is offered.
  assert property (@(posedge clk) disable iff (!rst_n) inp_data_used |-> inp_data_ready);
  assert property (@(posedge clk) disable iff (!rst_n) wr_config_used |-> wr_config_ready);
  assert property (@(posedge clk) disable iff (!rst_n) int_config_used |-> int_config_ready);
endmodule
