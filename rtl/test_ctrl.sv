// test_ctrl: block-test multiplexers of one channel. The 4-bit test mode
// gives 16 modes: test_mode[3:2] chooses what feeds the channel's comb
// filter (external modulator, internal vector generator, constant +1 or
// constant -1 stream) and test_mode[1:0] chooses which stage's output is
// sent to the serial interface (third half-band filter in normal use, or the
// comb, first or second half-band filter for block test).
//
// The selected stage's 24-bit sample (full scale 2^20) is converted to the
// 18-bit output word by an arithmetic shift right by 3 with saturation, and
// held until that stage delivers its next sample; a stage faster than fs is
// thus sampled at the frame rate by the interface. in_bit is combinational
// from the mode and the input bits; pcm is registered one cycle after the
// selected stage's valid strobe. The design states that there are 16 test
// modes for block test; their assignment here is this implementation's.
module test_ctrl
  import sdadc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              test_mode,
  // input selection
  input  logic                    sdm_bit,
  input  logic                    gen_bit,
  output logic                    in_bit,
  // observed stage outputs
  input  logic [3:0]              stage_valid,   // indexed by test_obs_e
  input  logic signed [SMP_W-1:0] stage_data [4],
  output logic signed [PCM_W-1:0] pcm
);

  test_src_e src;
  test_obs_e obs;

  assign src = test_src_e'(test_mode[3:2]);
  assign obs = test_obs_e'(test_mode[1:0]);

  always_comb begin
    unique case (src)
      SRC_MOD:  in_bit = sdm_bit;
      SRC_GEN:  in_bit = gen_bit;
      SRC_ONE:  in_bit = 1'b1;
      SRC_ZERO: in_bit = 1'b0;
    endcase
  end

  localparam int unsigned SHIFT = FS_LOG2 - (PCM_W - 1);  // 2^20 -> 2^17
  localparam logic signed [SMP_W-1:0] PMAX = SMP_W'((1 <<< (PCM_W - 1)) - 1);
  localparam logic signed [SMP_W-1:0] PMIN = -SMP_W'(1 <<< (PCM_W - 1));

  logic signed [SMP_W-1:0] shifted;

  always_comb shifted = stage_data[obs] >>> SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcm <= '0;
    end else if (stage_valid[obs]) begin
      if (shifted > PMAX)      pcm <= PCM_W'(PMAX);
      else if (shifted < PMIN) pcm <= PCM_W'(PMIN);
      else                     pcm <= PCM_W'(shifted);
    end
  end

endmodule
