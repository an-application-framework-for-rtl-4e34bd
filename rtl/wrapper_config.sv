// wrapper_config: wrapper configuration registers of a functional unit.
//
// 2**WR_CONFIG_BITS registers, each (14 - ADDRESS_BITS - WR_CONFIG_BITS) bits wide, written by
// wrapper configuration events. As described for the architecture, register 0 says whether the
// unit is ready for operation (bit 0 drives module_active), register 1 holds how many times the
// unit is reused in one schedule period, and the remaining registers hold a destination and a
// delay for each output register. The layout of those remaining registers is this design's
// choice: for execution index i (0 .. NUM_REUSE-1, selected by config_index) and output k,
// register 2 + 2*(i*NUM_OUTPUTS + k) is the destination address and the next one the delay.
// out_reg_active[k] is high when the destination of output k for the current index has been
// written, so an output that was never configured stays silent.
//
// In the flash-based design these cells are non-volatile: they keep their value while the
// wrapper domain is powered down, so nothing here clears them except the power-on reset.
// A configuration sub-packet is taken (wr_config_used pulses) in the cycle after wr_config_ready
// rises; cfg_write marks that cycle for the power manager. Reads are combinational.
module wrapper_config
  import dfp_pkg::*;
#(
  parameter int unsigned ADDRESS_BITS   = 4,
  parameter int unsigned WR_CONFIG_BITS = 3,
  parameter int unsigned NUM_OUTPUTS    = 1,
  parameter int unsigned NUM_REUSE      = 3,
  localparam int unsigned CW   = cfg_width(ADDRESS_BITS),
  localparam int unsigned VW   = cfg_value_width(ADDRESS_BITS, WR_CONFIG_BITS),
  localparam int unsigned NREG = 1 << WR_CONFIG_BITS,
  localparam int unsigned IW   = (NUM_REUSE > 1) ? $clog2(NUM_REUSE) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CW-1:0]           wr_config_packet,
  input  logic                    wr_config_ready,
  output logic                    wr_config_used,
  input  logic [IW-1:0]           config_index,
  output logic [ADDRESS_BITS-1:0] destination_addresses [NUM_OUTPUTS],
  output logic [VW-1:0]           delay_values          [NUM_OUTPUTS],
  output logic [NUM_OUTPUTS-1:0]  out_reg_active,
  output logic                    module_active,
  output logic [VW-1:0]           reuse_count,
  output logic                    cfg_write
);
  if (2 + 2 * NUM_REUSE * NUM_OUTPUTS > NREG) begin : g_check1
    $error("WR_CONFIG_BITS too small for NUM_REUSE x NUM_OUTPUTS destination/delay pairs");
  end
  if (VW < ADDRESS_BITS) begin : g_check2
    $error("wrapper register too narrow to hold a destination address");
  end

  logic [VW-1:0]   regs    [NREG];
  logic [NREG-1:0] written;

  wire [WR_CONFIG_BITS-1:0] waddr = wr_config_packet[CW-1 -: WR_CONFIG_BITS];
  wire [VW-1:0]             wval  = wr_config_packet[VW-1:0];

  assign wr_config_used = wr_config_ready;
  assign cfg_write      = wr_config_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
      written <= '0;
    end else if (wr_config_ready) begin
      regs[waddr]    <= wval;
      written[waddr] <= 1'b1;
    end
  end

  assign module_active = regs[0][0];
  assign reuse_count   = regs[1];

  always_comb begin
    for (int k = 0; k < NUM_OUTPUTS; k++) begin
      int unsigned slot;
      slot = 2 + 2 * (int'(config_index) * NUM_OUTPUTS + k);
      if (slot + 1 < NREG) begin
        destination_addresses[k] = regs[slot][ADDRESS_BITS-1:0];
        delay_values[k]          = regs[slot+1];
        out_reg_active[k]        = written[slot];
      end else begin
        destination_addresses[k] = '0;
        delay_values[k]          = '0;
        out_reg_active[k]        = 1'b0;
      end
    end
  end
endmodule
