// fu_delay: internal module of the Delay-generator functional unit.
//
// A tapped delay line. On start the new sample enters the line and, in the next cycle, output
// register k holds the sample of k events ago (k = 0 .. NUM_OUTPUTS-1): x[n], x[n-1], x[n-2]
// for three outputs. This supplies the current and previous inputs that a finite impulse
// response filter weights. The delay generator and its several output registers are part of
// the architecture; the tapped-line function is this design's reading of the filter
// application, where it feeds three branches. The line starts at zero after reset.
module fu_delay #(
  parameter int unsigned DATA_W      = 11,
  parameter int unsigned NUM_OUTPUTS = 3
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
      if (start) begin
        result[0] <= a;
        for (int k = 1; k < NUM_OUTPUTS; k++) result[k] <= result[k-1];
      end
    end
  end
endmodule
