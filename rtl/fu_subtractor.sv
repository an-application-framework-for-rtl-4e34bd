// fu_subtractor: internal module of the Subtractor functional unit.
//
// On start it computes a - b (first operand minus second, modulo 2**DATA_W) and presents it
// with a one-cycle done pulse in the next cycle. The unit is part of the architecture set;
// the operand order and arithmetic are this design's choice.
module fu_subtractor #(
  parameter int unsigned DATA_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              done,
  output logic [DATA_W-1:0] result
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= a - b;
    end
  end
endmodule
