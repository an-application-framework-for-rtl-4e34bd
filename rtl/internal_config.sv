// internal_config: internal configuration registers of a functional unit.
//
// 2**INT_CONFIG_BITS registers of (14 - ADDRESS_BITS - INT_CONFIG_BITS) bits, written by
// internal configuration events and forwarded to the internal module, as described for the
// architecture. Which registers feed the internal module is this design's choice: for the
// execution index config_index (one index per reuse of the unit) the module sees INT_VALUES
// consecutive registers starting at config_index*INT_VALUES, on int_config_value[0..]. An
// internal module that needs a wider value (a constant, a timer period) concatenates them,
// value[1] being the more significant part.
// A sub-packet is taken (int_config_used pulses) in the cycle after int_config_ready rises.
module internal_config
  import dfp_pkg::*;
#(
  parameter int unsigned ADDRESS_BITS    = 4,
  parameter int unsigned INT_CONFIG_BITS = 3,
  parameter int unsigned NUM_REUSE       = 3,
  parameter int unsigned INT_VALUES      = 2,
  localparam int unsigned CW   = cfg_width(ADDRESS_BITS),
  localparam int unsigned VW   = cfg_value_width(ADDRESS_BITS, INT_CONFIG_BITS),
  localparam int unsigned NREG = 1 << INT_CONFIG_BITS,
  localparam int unsigned IW   = (NUM_REUSE > 1) ? $clog2(NUM_REUSE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] int_config_packet,
  input  logic          int_config_ready,
  output logic          int_config_used,
  input  logic [IW-1:0] config_index,
  output logic [VW-1:0] int_config_value [INT_VALUES],
  output logic          cfg_write
);
  if (NUM_REUSE * INT_VALUES > NREG) begin : g_check1
    $error("INT_CONFIG_BITS too small for NUM_REUSE x INT_VALUES registers");
  end

  logic [VW-1:0] regs [NREG];

  wire [INT_CONFIG_BITS-1:0] waddr = int_config_packet[CW-1 -: INT_CONFIG_BITS];
  wire [VW-1:0]              wval  = int_config_packet[VW-1:0];

  assign int_config_used = int_config_ready;
  assign cfg_write       = int_config_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else if (int_config_ready) begin
      regs[waddr] <= wval;
    end
  end

  always_comb begin
    for (int j = 0; j < INT_VALUES; j++) begin
      int unsigned r;
      r = int'(config_index) * INT_VALUES + j;
      int_config_value[j] = (r < NREG) ? regs[r] : '0;
    end
  end
endmodule
