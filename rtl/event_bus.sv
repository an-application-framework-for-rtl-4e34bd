// event_bus: one event bus shared by N_DRV senders.
//
// Every sender drives zero when it is not sending, so the bus lines are the OR of all drivers
// and bus_busy the OR of their busy flags. Sending on the bus follows the architecture; in the
// intended use a static schedule keeps functional units from colliding, and the arbiter only
// settles the rare case of two requests in the same cycle (and lets the input FIFO use free
// cycles). Arbitration is fixed priority, lowest index first, and a grant holds the bus for one
// whole packet of PACKET_WIDTH/BUS_WIDTH beats: no new grant is given before its last beat.
// Grants are combinational from req in the cycle the first beat goes out. collision flags two
// drivers busy in one cycle, which the arbiter rules out; grant_waits counts cycles in which a
// request was held back.
module event_bus
  import dfp_pkg::*;
#(
  parameter int unsigned N_DRV     = 2,
  parameter int unsigned BUS_WIDTH = 16,
  localparam int unsigned BEATS = PACKET_WIDTH / BUS_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_DRV-1:0]     req,
  output logic [N_DRV-1:0]     grant,
  input  logic [N_DRV-1:0]     drv_busy,
  input  logic [BUS_WIDTH-1:0] drv_data [N_DRV],
  output logic                 bus_busy,
  output logic [BUS_WIDTH-1:0] bus_data,
  output logic                 collision,
  output logic [15:0]          grant_waits
);
  localparam int unsigned BCW = (BEATS > 1) ? $clog2(BEATS + 1) : 1;
  logic [BCW-1:0] beats_left;

  always_comb begin
    grant = '0;
    if (beats_left == '0) begin
      for (int i = N_DRV - 1; i >= 0; i--) begin
        if (req[i]) grant = N_DRV'(1) << i;
      end
    end
  end

  always_comb begin
    bus_data = '0;
    for (int i = 0; i < N_DRV; i++) bus_data |= drv_data[i];
  end
  assign bus_busy  = |drv_busy;
  assign collision = (drv_busy & (drv_busy - 1'b1)) != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beats_left  <= '0;
      grant_waits <= '0;
    end else begin
      if (|grant) beats_left <= BCW'(BEATS - 1);
      else if (beats_left != '0) beats_left <= beats_left - 1'b1;
      if ((req & ~grant) != '0 && grant_waits != '1) grant_waits <= grant_waits + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !collision);
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
