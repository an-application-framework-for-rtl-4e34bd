// fu_multiplier: internal module of the Multiplier functional unit.
//
// A sequential shift-and-add multiplier: after start it examines one bit of the second operand
// per cycle, adding the shifted first operand to a 2*DATA_W-bit accumulator, and pulses done
// DATA_W + 1 cycles after start (one cycle to take the operands, DATA_W steps) with the
// product shifted right by `shift` and cut to DATA_W bits. The
// right shift lets fixed-point coefficients be used (a coefficient c/2**s with shift s).
// Shift-and-add multiplication is the approach the multiplier application uses; the shift
// setting and the one-bit-per-cycle timing are this design's choice. busy is high from start
// to done.
module fu_multiplier #(
  parameter int unsigned DATA_W  = 11,
  parameter int unsigned SHIFT_W = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [DATA_W-1:0]  a,
  input  logic [DATA_W-1:0]  b,
  input  logic [SHIFT_W-1:0] shift,
  output logic               busy,
  output logic               done,
  output logic [DATA_W-1:0]  result
);
  localparam int unsigned CW = $clog2(DATA_W + 1);

  logic [2*DATA_W-1:0] acc, mcand;
  logic [DATA_W-1:0]   mplier;
  logic [CW-1:0]       steps;
  logic [SHIFT_W-1:0]  shift_q;

  wire [2*DATA_W-1:0] acc_next = mplier[0] ? acc + mcand : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      acc     <= '0;
      mcand   <= '0;
      mplier  <= '0;
      steps   <= '0;
      shift_q <= '0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        acc     <= '0;
        mcand   <= {{DATA_W{1'b0}}, a};
        mplier  <= b;
        steps   <= CW'(DATA_W);
        shift_q <= shift;
      end else if (busy) begin
        acc    <= acc_next;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        steps  <= steps - 1'b1;
        if (steps == CW'(1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= DATA_W'(acc_next >> shift_q);
        end
      end
    end
  end
endmodule
