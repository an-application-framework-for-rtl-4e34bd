// output_bus_if: output bus-interface for one output register of a functional unit.
//
// When the unit finishes an execution, load hands over the result together with the
// destination address and delay read from the wrapper configuration for this output. The
// interface then waits `delay` cycles and sends a data event {destination, 0, data} on the
// event bus through a bus_tx. Sending results to destinations on scheduled cycles follows the
// architecture; counting the delay from the cycle of load is this design's choice, as is
// dropping the result when the output register is not configured (out_active low).
// idle is high when nothing is held; the output domain may then be powered down.
// Timing: with delay d and an immediate grant, the first beat is on the bus d+2 cycles after
// load.
module output_bus_if
  import dfp_pkg::*;
#(
  parameter int unsigned ADDRESS_BITS = 4,
  parameter int unsigned DELAY_W      = 7,
  parameter int unsigned BUS_WIDTH    = 16,
  localparam int unsigned DW = data_width(ADDRESS_BITS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [DW-1:0]           data,
  input  logic [ADDRESS_BITS-1:0] dest,
  input  logic [DELAY_W-1:0]      delay,
  input  logic                    out_active,
  output logic                    idle,
  output logic                    req,
  input  logic                    grant,
  output logic                    drv_busy,
  output logic [BUS_WIDTH-1:0]    drv_data,
  output logic                    sent
);
  typedef enum logic [1:0] {O_IDLE, O_WAIT, O_SEND} out_state_e;
  out_state_e              state;
  logic [DELAY_W-1:0]      count;
  logic [PACKET_WIDTH-1:0] pkt;
  logic                    tx_load, tx_idle;

  assign idle    = (state == O_IDLE);
  assign tx_load = (state == O_WAIT) && (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= O_IDLE;
      count <= '0;
      pkt   <= '0;
    end else begin
      unique case (state)
        O_IDLE: if (load && out_active) begin
          pkt   <= {dest, 1'b0, data};
          count <= delay;
          state <= O_WAIT;
        end
        O_WAIT: if (count == '0) state <= O_SEND;
                else count <= count - 1'b1;
        O_SEND: if (sent) state <= O_IDLE;
        default: state <= O_IDLE;
      endcase
    end
  end

  bus_tx #(.BUS_WIDTH(BUS_WIDTH)) u_tx (
    .clk, .rst_n,
    .load(tx_load), .packet(pkt), .idle(tx_idle),
    .req, .grant, .drv_busy, .drv_data, .done(sent)
  );

  assert property (@(posedge clk) disable iff (!rst_n) load |-> idle);
  assert property (@(posedge clk) disable iff (!rst_n) tx_load |-> tx_idle);
endmodule
