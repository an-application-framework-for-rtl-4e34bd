// fu_splitter: internal module of the Splitter functional unit.
//
// On start it copies its operand to all NUM_OUTPUTS output registers and pulses done in the
// next cycle, so one event can be sent to several destinations. Copying the value follows the
// role of the splitter in the application graphs; the one-cycle latency is this design's choice.
module fu_splitter #(
  parameter int unsigned DATA_W      = 11,
  parameter int unsigned NUM_OUTPUTS = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] a,
  output logic              done,
  output logic [DATA_W-1:0] result [NUM_OUTPUTS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int k = 0; k < NUM_OUTPUTS; k++) result[k] <= '0;
    end else begin
      done <= start;
      if (start) for (int k = 0; k < NUM_OUTPUTS; k++) result[k] <= a;
    end
  end
endmodule
