// sdadc_top: digital part of a two-channel 18-bit sigma-delta audio ADC.
// Each channel takes the 1-bit output of an external sigma-delta modulator
// sampled at MCLK = 6.144 MHz (128 fs, fs = 48 kHz), decimates it by 128
// through a comb filter (x16) and three half-band FIR filters (x2 each), and
// the two 18-bit results leave the chip as an I2S stream (bclk = 64 fs,
// lrclk = fs) and, for convenience, as parallel words.
//
// Test logic: a 4-bit test mode (16 modes, see test_ctrl) selects each
// channel's input (modulator, internal vector generator, constant +1 or -1)
// and the stage observed at the output. gen_level sets the DC level of the
// internal vector generator (tv_gen), which drives both channels.
//
// Timing: the modulator bits are taken on every MCLK edge. The parallel
// words pcm_l/pcm_r change once per 128 clocks with a one-cycle pcm_valid,
// and are the words sent on sdata during the following frame.
//
// Parameters: COMB_ARCH picks one of the three equivalent comb structures;
// HBF1_CW..HBF3_CW are the half-band coefficient widths, 16/16/24 bits as
// designed, or 8 bits for the cheaper, lower-rejection alternative.
module sdadc_top
  import sdadc_pkg::*;
#(
  parameter comb_arch_e  COMB_ARCH = COMB_CASCADE,
  parameter int unsigned HBF1_CW   = 16,
  parameter int unsigned HBF2_CW   = 16,
  parameter int unsigned HBF3_CW   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sdm_l,
  input  logic                    sdm_r,
  input  logic [3:0]              test_mode,
  input  logic signed [15:0]      gen_level,
  output logic                    bclk,
  output logic                    lrclk,
  output logic                    sdata,
  output logic                    pcm_valid,
  output logic signed [PCM_W-1:0] pcm_l,
  output logic signed [PCM_W-1:0] pcm_r
);

  logic gen_bit;

  tv_gen u_gen (.clk, .rst_n, .en(1'b1), .level(gen_level), .bit_out(gen_bit));

  logic                    sdm_bit [2];
  logic signed [PCM_W-1:0] ch_pcm  [2];

  assign sdm_bit[0] = sdm_l;
  assign sdm_bit[1] = sdm_r;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic                    in_bit;
    logic [3:0]              sv;
    logic signed [SMP_W-1:0] sd [4];

    adc_channel #(
      .COMB_ARCH(COMB_ARCH), .HBF1_CW(HBF1_CW), .HBF2_CW(HBF2_CW), .HBF3_CW(HBF3_CW)
    ) u_ch (
      .clk, .rst_n, .in_valid(1'b1), .in_bit,
      .comb_valid(sv[OBS_COMB]), .comb_data(sd[OBS_COMB]),
      .hbf1_valid(sv[OBS_HBF1]), .hbf1_data(sd[OBS_HBF1]),
      .hbf2_valid(sv[OBS_HBF2]), .hbf2_data(sd[OBS_HBF2]),
      .hbf3_valid(sv[OBS_HBF3]), .hbf3_data(sd[OBS_HBF3])
    );

    test_ctrl u_test (
      .clk, .rst_n, .test_mode,
      .sdm_bit(sdm_bit[c]), .gen_bit, .in_bit,
      .stage_valid(sv), .stage_data(sd), .pcm(ch_pcm[c])
    );
  end

  i2s_tx #(.W(PCM_W)) u_i2s (
    .clk, .rst_n, .in_l(ch_pcm[0]), .in_r(ch_pcm[1]),
    .bclk, .lrclk, .sdata, .pcm_valid, .pcm_l, .pcm_r
  );

endmodule
