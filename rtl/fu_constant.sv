// fu_constant: internal module of the Constant-generator functional unit.
//
// An incoming event (its value is ignored) triggers the unit; in the next cycle it presents the
// configured constant with a one-cycle done pulse. The constant comes from the internal
// configuration of the current execution index, so a reused unit can give a different constant
// each time (the three filter coefficients from one unit). The trigger-by-event behaviour is
// this design's reading of the filter application graph, where a splitter feeds each constant.
module fu_constant #(
  parameter int unsigned DATA_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] value,
  output logic              done,
  output logic [DATA_W-1:0] result
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= value;
    end
  end
endmodule
