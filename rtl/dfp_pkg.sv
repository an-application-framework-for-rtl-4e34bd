// dfp_pkg: types and constants shared by the data-flow processor.
//
// Every event in the processor travels as one 16-bit packet. From the most significant bit
// down it holds the destination unit address (ADDRESS_BITS wide), the event-mode bit (1 for a
// configuration event, 0 for a data event) and then either the data value (15 - ADDRESS_BITS
// bits) or, for a configuration event, a wrapper/internal select bit, a register address and a
// register value. The 16-bit length and the field order follow the packet layout of the
// architecture; the helper functions here only compute field widths.
//
// pwr_state_t is the power state of one functional unit written as the four domain enables
// (input bus-interface, wrapper configuration, internal module, output bus-interface).
// in_fifo_pwr_t and out_fifo_pwr_t are the domain enables of the two network FIFOs.
package dfp_pkg;

  localparam int unsigned PACKET_WIDTH = 16;

  // Width of the data field of a data event.
  function automatic int unsigned data_width(int unsigned address_bits);
    return PACKET_WIDTH - 1 - address_bits;
  endfunction

  // Width of the configuration sub-packet (register address plus value) of a configuration
  // event, after the address, event-mode and wrapper/internal bits.
  function automatic int unsigned cfg_width(int unsigned address_bits);
    return PACKET_WIDTH - 2 - address_bits;
  endfunction

  // Width of a configuration register value for a given register-address width.
  function automatic int unsigned cfg_value_width(int unsigned address_bits,
                                                  int unsigned reg_bits);
    return PACKET_WIDTH - 2 - address_bits - reg_bits;
  endfunction

  typedef struct packed {
    logic in_on;    // input bus-interface powered
    logic wr_on;    // wrapper configuration powered
    logic int_on;   // internal module powered
    logic out_on;   // output bus-interface powered
  } pwr_state_t;

  typedef struct packed {
    logic net_if_on;  // network interface powered (always: the network may send at any time)
    logic int_on;     // packet storage powered
    logic bus_if_on;  // bus interface powered
  } in_fifo_pwr_t;

  typedef struct packed {
    logic bus_in_on;  // bus input (input bus-interface) powered
    logic int_on;     // storage powered
    logic net_out_on; // network output powered
  } out_fifo_pwr_t;

  // Kind of internal module plugged into a functional-unit template.
  typedef enum logic [3:0] {
    FU_TIMER,
    FU_ADC,
    FU_ADDER,
    FU_SUBTRACTOR,
    FU_MULTIPLIER,
    FU_CONSTANT,
    FU_SPLITTER,
    FU_DELAY,
    FU_COMPARATOR
  } fu_kind_e;

endpackage
