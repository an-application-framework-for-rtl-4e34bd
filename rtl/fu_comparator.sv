// fu_comparator: internal module of the Comparator functional unit.
//
// On start it compares its operand with a threshold taken from the internal configuration and
// presents 1 when the operand is greater than the threshold, 0 otherwise, with a one-cycle done
// pulse in the next cycle. Comparing a computed value with a predefined threshold follows the
// free-fall detector application; unsigned comparison and the 0/1 result are this design's
// choice.
module fu_comparator #(
  parameter int unsigned DATA_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] threshold,
  output logic              done,
  output logic [DATA_W-1:0] result
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= DATA_W'(a > threshold);
    end
  end
endmodule
