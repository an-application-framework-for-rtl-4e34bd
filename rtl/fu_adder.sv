// fu_adder: internal module of the Adder functional unit.
//
// On start it adds its two operands and presents the DATA_W-bit sum (modulo 2**DATA_W) with a
// one-cycle done pulse in the next cycle. The Adder unit is part of the architecture; its
// one-cycle, wrap-around unsigned arithmetic is this design's choice.
module fu_adder #(
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
      if (start) result <= a + b;
    end
  end
endmodule
