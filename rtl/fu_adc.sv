// fu_adc: digital part of the A/D converter functional unit (successive approximation).
//
// An event on start begins a conversion of `resolution` bits (0 or more than DATA_W means
// DATA_W). One bit is decided per cycle, most significant first: the trial code is put on
// dac_code, left-aligned to DATA_W bits, for the analog comparator outside, and the bit is kept
// when comp reports that the input is at or above that level. done pulses with the
// right-aligned code on result resolution + 1 cycles after start. The ADC unit, its trigger by
// a timer event and its resolution setting (8 in the filter example) follow the application
// description; the successive-approximation method is this design's choice (an 8-bit
// conversion then keeps the internal module busy 8 cycles, as in the reported A/D power-state
// counts). The sample-and-hold, DAC and comparator are analog and lie outside this module.
module fu_adc #(
  parameter int unsigned DATA_W = 11,
  parameter int unsigned RES_W  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [RES_W-1:0]  resolution,
  output logic [DATA_W-1:0] dac_code,
  input  logic              comp,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] result
);
  localparam int unsigned BW = $clog2(DATA_W + 1);

  logic [DATA_W-1:0] code;
  logic [BW-1:0]     bitpos;   // bit being decided
  logic [BW-1:0]     res_q;    // resolution of the running conversion

  wire [BW-1:0] res_eff = (resolution == '0 || int'(resolution) > DATA_W)
                          ? BW'(DATA_W) : BW'(resolution);
  wire [DATA_W-1:0] trial = code | (DATA_W'(1) << bitpos);

  assign dac_code = busy ? (trial << (BW'(DATA_W) - res_q)) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      code   <= '0;
      bitpos <= '0;
      res_q  <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        code   <= '0;
        res_q  <= res_eff;
        bitpos <= res_eff - 1'b1;
      end else if (busy) begin
        if (comp) code <= trial;
        if (bitpos == '0) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= comp ? trial : code;
        end else begin
          bitpos <= bitpos - 1'b1;
        end
      end
    end
  end
endmodule
