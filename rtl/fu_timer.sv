// fu_timer: internal module of the Timer functional unit.
//
// While enabled and given a non-zero period it counts clock cycles and, every `period` cycles,
// pulses done with result = number of ticks so far (modulo 2**DATA_W). The tick is the event
// that starts an application's schedule period (the timer triggers the ADC in the sensing
// applications). A periodic timer with a configured period (30,000 in the filter example)
// follows the application description; free running once enabled, the tick value and clearing
// the count when disabled are this design's choice. Timing: the first tick comes `period`
// cycles after enable rises.
module fu_timer #(
  parameter int unsigned DATA_W   = 11,
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [PERIOD_W-1:0] period,
  output logic                done,
  output logic [DATA_W-1:0]   result
);
  logic [PERIOD_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (!enable || period == '0) begin
        count <= '0;
      end else if (count == period - 1'b1) begin
        count  <= '0;
        done   <= 1'b1;
        result <= result + 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
