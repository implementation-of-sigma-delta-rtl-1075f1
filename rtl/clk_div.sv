// clk_div: frame timing derived from MCLK (128 fs). A 7-bit counter runs
// through one output frame; from it come the I2S bit clock
// (bclk = MCLK/2 = 64 fs, low in the first and high in the second MCLK
// cycle of each bit slot), the word clock (lrclk = fs, low for the left
// word in slots 0-31, high for the right word in slots 32-63), the current
// bit slot and a strobe in the last MCLK cycle of the frame. The divider
// itself is named by the design; the ratios follow from its 6.144 MHz clock
// and 48 kHz word rate, and the slot layout is this implementation's choice.
module clk_div
  import sdadc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       bclk,
  output logic       lrclk,
  output logic [5:0] slot,
  output logic       frame_last
);

  localparam int unsigned CNT_W = $clog2(MCLK_PER_FS);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign bclk       = cnt[0];
  assign lrclk      = cnt[CNT_W-1];
  assign slot       = cnt[CNT_W-1:1];
  assign frame_last = (cnt == CNT_W'(MCLK_PER_FS - 1));

endmodule
