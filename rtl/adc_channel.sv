// adc_channel: the decimation chain of one channel, total decimation 128.
//   1-bit at 128 fs -> comb_filter (x16)   -> 22-bit at 8 fs
//                   -> HBF1, 12 taps (x2)  -> 24-bit at 4 fs
//                   -> HBF2, 22 taps (x2)  -> 24-bit at 2 fs
//                   -> HBF3, 116 taps (x2) -> 24-bit at fs
// Every stage output is brought out (valid strobe and data, at the 24-bit
// scale where 2^20 is full scale) so that the test logic can observe it.
// The chain, the tap counts and the coefficient widths (16, 16 and 24 bits
// by default; 8 bits is the design's short-coefficient alternative) are the
// design's; the comb structure is chosen with COMB_ARCH. In steady state
// a new output appears every 128 clocks.
module adc_channel
  import sdadc_pkg::*;
#(
  parameter comb_arch_e  COMB_ARCH = COMB_CASCADE,
  parameter int unsigned HBF1_CW   = 16,
  parameter int unsigned HBF2_CW   = 16,
  parameter int unsigned HBF3_CW   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    comb_valid,
  output logic signed [SMP_W-1:0] comb_data,
  output logic                    hbf1_valid,
  output logic signed [SMP_W-1:0] hbf1_data,
  output logic                    hbf2_valid,
  output logic signed [SMP_W-1:0] hbf2_data,
  output logic                    hbf3_valid,
  output logic signed [SMP_W-1:0] hbf3_data
);

  logic signed [COMB_W-1:0] comb_raw;
  logic                     busy1, busy2, busy3;

  comb_filter #(.COMB_ARCH(COMB_ARCH)) u_comb (
    .clk, .rst_n, .in_valid, .in_bit,
    .out_valid(comb_valid), .out_data(comb_raw)
  );

  assign comb_data = SMP_W'(comb_raw);

  hbf_decim #(.STAGE(1), .N_TAPS(12), .CW(HBF1_CW), .MUL_W(SMP_W + 1), .ACC_W(42)) u_hbf1 (
    .clk, .rst_n, .in_valid(comb_valid), .in_data(comb_data),
    .out_valid(hbf1_valid), .out_data(hbf1_data), .busy(busy1)
  );

  hbf_decim #(.STAGE(2), .N_TAPS(22), .CW(HBF2_CW), .MUL_W(SMP_W + 1), .ACC_W(42)) u_hbf2 (
    .clk, .rst_n, .in_valid(hbf1_valid), .in_data(hbf1_data),
    .out_valid(hbf2_valid), .out_data(hbf2_data), .busy(busy2)
  );

  hbf_decim #(.STAGE(3), .N_TAPS(116), .CW(HBF3_CW), .MUL_W(32), .ACC_W(48)) u_hbf3 (
    .clk, .rst_n, .in_valid(hbf2_valid), .in_data(hbf2_data),
    .out_valid(hbf3_valid), .out_data(hbf3_data), .busy(busy3)
  );

  // The busy flags are checked inside each filter; they are not needed here.
  logic unused_busy;
  assign unused_busy = busy1 ^ busy2 ^ busy3;

endmodule
