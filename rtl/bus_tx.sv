// bus_tx: puts one 16-bit packet on the event bus.
//
// load (while idle) stores a packet and raises req. The bus arbiter answers with grant in the
// same cycle; the first beat is driven in that cycle and the remaining PACKET_WIDTH/BUS_WIDTH-1
// beats in the cycles after it, most significant beat first. drv_busy is high on every beat and
// drv_data carries the beat (zero otherwise, so drivers can be ORed onto the bus). done pulses
// on the last beat; the sender is idle again in the next cycle. Serialising by BUS_WIDTH follows
// the architecture's BUS_WIDTH parameter; the request/grant exchange is this design's choice.
module bus_tx
  import dfp_pkg::*;
#(
  parameter int unsigned BUS_WIDTH = 16,
  localparam int unsigned BEATS = PACKET_WIDTH / BUS_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [PACKET_WIDTH-1:0] packet,
  output logic                    idle,
  output logic                    req,
  input  logic                    grant,
  output logic                    drv_busy,
  output logic [BUS_WIDTH-1:0]    drv_data,
  output logic                    done
);
  localparam int unsigned BCW = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [1:0] {TX_IDLE, TX_REQ, TX_BEATS} tx_state_e;
  tx_state_e               state;
  logic [PACKET_WIDTH-1:0] shreg;
  logic [BCW-1:0]          beat;

  assign idle = (state == TX_IDLE);
  assign req  = (state == TX_REQ);

  always_comb begin
    drv_busy = 1'b0;
    drv_data = '0;
    done     = 1'b0;
    if ((state == TX_REQ && grant) || state == TX_BEATS) begin
      drv_busy = 1'b1;
      drv_data = shreg[PACKET_WIDTH-1 -: BUS_WIDTH];
      done     = (state == TX_REQ) ? (BEATS == 1) : (beat == BCW'(BEATS - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      shreg <= '0;
      beat  <= '0;
    end else begin
      unique case (state)
        TX_IDLE: if (load) begin
          shreg <= packet;
          state <= TX_REQ;
        end
        TX_REQ: if (grant) begin
          shreg <= shreg << BUS_WIDTH;
          beat  <= BCW'(1);
          state <= (BEATS == 1) ? TX_IDLE : TX_BEATS;
        end
        TX_BEATS: begin
          shreg <= shreg << BUS_WIDTH;
          beat  <= beat + 1'b1;
          if (done) state <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) load |-> idle);
endmodule
