// power_manager: power-domain control of one functional unit.
//
// A functional unit has four domains: input bus-interface, wrapper configuration, internal
// module and output bus-interface. Following the execution sequence of the flash-based design,
// each domain is on only while it has work:
//   input    while a packet is on the bus (it must listen) or it holds an unused packet;
//   wrapper  while a configuration register is written, or while the destination and delay of
//            a finished result are handed to the output bus-interface;
//   internal while the internal module runs, from the cycle it takes its operands to done;
//   output   while the output bus-interface holds, waits with or sends a result.
// A cycle with every domain off is a free cycle (the unit is completely powered down); any
// other cycle is a busy cycle. With FLASH_CONFIG = 0 the module describes the earlier design,
// whose wrapper registers are volatile and so stay powered all the time.
// The enables are combinational from the activity flags. busy_cycles and free_cycles count the
// two kinds of cycle (saturating at 2**16-1) for power estimates; clear zeroes them.
// What wakes each domain is this design's reading of the execution sequence; the domains and
// the states themselves follow the architecture. The switches are not modelled here.
module power_manager
  import dfp_pkg::*;
#(
  parameter bit FLASH_CONFIG = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_active,
  input  logic        cfg_write,
  input  logic        cfg_read,
  input  logic        int_active,
  input  logic        out_active,
  output pwr_state_t  state,
  output logic        off_complete,
  output logic [15:0] busy_cycles,
  output logic [15:0] free_cycles
);
  always_comb begin
    state.in_on  = in_active;
    state.wr_on  = FLASH_CONFIG ? (cfg_write || cfg_read) : 1'b1;
    state.int_on = int_active;
    state.out_on = out_active;
  end

  wire busy = in_active || cfg_write || cfg_read || int_active || out_active;
  assign off_complete = (state == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cycles <= '0;
      free_cycles <= '0;
    end else if (clear) begin
      busy_cycles <= '0;
      free_cycles <= '0;
    end else if (busy) begin
      if (busy_cycles != '1) busy_cycles <= busy_cycles + 1'b1;
    end else begin
      if (free_cycles != '1) free_cycles <= free_cycles + 1'b1;
    end
  end
endmodule
