// i2s_tx: digital output interface. Sends the two channel words serially in
// I2S format: 64 bit clocks per frame, 32 per channel, left word while
// lrclk is low, most significant bit first, starting one bit clock after
// lrclk changes; bits after the W-bit word are zero. sdata changes when
// bclk falls and is stable when it rises.
//
// The words on in_l/in_r are captured in the last MCLK cycle of a frame and
// sent during the next frame; pcm_l/pcm_r show the captured pair and
// pcm_valid pulses once per frame, in the cycle after the capture.
// The use of I2S is the design's; the 32-bit slot and the capture point
// are this implementation's choices.
module i2s_tx
  import sdadc_pkg::*;
#(
  parameter int unsigned W = PCM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] in_l,
  input  logic signed [W-1:0] in_r,
  output logic                bclk,
  output logic                lrclk,
  output logic                sdata,
  output logic                pcm_valid,
  output logic signed [W-1:0] pcm_l,
  output logic signed [W-1:0] pcm_r
);

  logic [5:0] slot;
  logic       frame_last;

  clk_div u_div (.clk, .rst_n, .bclk, .lrclk, .slot, .frame_last);

  // Bit to be sent in slot s of the current frame.
  function automatic logic slot_bit(input logic [5:0] s, input logic [W-1:0] l,
                                    input logic [W-1:0] r);
    int unsigned p;
    p = int'(s[4:0]);
    if (p == 0 || p > W) return 1'b0;
    return s[5] ? r[W - p] : l[W - p];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcm_l     <= '0;
      pcm_r     <= '0;
      pcm_valid <= 1'b0;
      sdata     <= 1'b0;
    end else begin
      pcm_valid <= frame_last;
      if (frame_last) begin
        pcm_l <= in_l;
        pcm_r <= in_r;
        sdata <= 1'b0;                                   // slot 0 of the next frame
      end else if (bclk) begin
        sdata <= slot_bit(slot + 6'd1, pcm_l, pcm_r);    // next slot
      end
    end
  end

endmodule
