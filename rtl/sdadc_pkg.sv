// sdadc_pkg: types and constants shared by the sigma-delta decimator.
//
// The decimator works on one clock, MCLK = 6.144 MHz = 128 fs (fs = 48 kHz).
// Every stage passes samples with a one-cycle valid strobe, so the sample
// rates 32 fs, 16 fs, 8 fs, 4 fs, 2 fs and fs appear as strobes, not clocks.
//
// Fixed-point convention: the comb decimator output is an integer whose
// full scale (a modulator stream of all +1) is 2^20, the product of the DC
// gains of H1 (256), H2 (32) and H3 (128). The half-band filters keep that
// scale (unity DC gain); the 18-bit output word is the 24-bit value shifted
// right by 3 and saturated.
//
// Half-band coefficients: the filters are symmetric, so only the first half
// of each impulse response is stored. They are equiripple (Parks-McClellan)
// low-pass designs with band edges placed symmetrically about a quarter of
// the filter's input rate, rounded to CW-bit two's complement with CW-1
// fraction bits:
//   HBF1: 12 taps at 384 kHz, pass 0-20 kHz, stop 172-192 kHz, CW = 16
//   HBF2: 22 taps at 192 kHz, pass 0-20 kHz, stop 76-96 kHz,   CW = 16
//   HBF3: 116 taps at 96 kHz, pass 0-20.5 kHz, stop 27-48 kHz, CW = 24
// The tap counts and coefficient widths are the design's; the coefficient
// values themselves are this implementation's own design. The filters can
// also be built with shorter coefficients (8 bits, say), rounded from these
// tables by hbf_coef_q, to trade stopband rejection for multiplier size.
package sdadc_pkg;

  // MCLK cycles per output frame (one left and one right word).
  localparam int unsigned MCLK_PER_FS = 128;

  // Word widths along the chain.
  localparam int unsigned H1_W   = 10;  // 4th-order comb output, +-256
  localparam int unsigned H2_W   = 15;  // after (1+z^-1)^5, +-2^13
  localparam int unsigned COMB_W = 22;  // after (1+z^-1)^7, +-2^20
  localparam int unsigned SMP_W  = 24;  // sample width between half-band filters
  localparam int unsigned PCM_W  = 18;  // output word
  localparam int unsigned FS_LOG2 = 20;  // full scale of the comb output is 2^FS_LOG2

  // Comb structure selection (the three structures compute the same filter).
  typedef enum logic [1:0] {
    COMB_INTDIFF = 2'd1,  // integrators and differentiators, wrap-around
    COMB_FIR     = 2'd2,  // direct-form binomial FIRs
    COMB_CASCADE = 2'd3   // cascaded (1 + z^-1) sections
  } comb_arch_e;

  // Test mode fields: test_mode[3:2] chooses the input, [1:0] the observed stage.
  typedef enum logic [1:0] {
    SRC_MOD  = 2'd0,  // external modulators
    SRC_GEN  = 2'd1,  // internal vector generator
    SRC_ONE  = 2'd2,  // constant +1 stream (positive full scale)
    SRC_ZERO = 2'd3   // constant -1 stream (negative full scale)
  } test_src_e;

  typedef enum logic [1:0] {
    OBS_HBF3 = 2'd0,  // normal output
    OBS_COMB = 2'd1,
    OBS_HBF1 = 2'd2,
    OBS_HBF2 = 2'd3
  } test_obs_e;

  // Coefficients of the 4th-order comb, equation (1+z^-1+z^-2+z^-3)^4.
  localparam int COMB4_C [13] = '{1, 4, 10, 20, 31, 40, 44, 40, 31, 20, 10, 4, 1};

  // Contents of the 64 x 8 comb ROM: entry a holds sum_{i=0..5} c_i * s_i
  // where s_i = +1 if address bit (5-i) is 1 and -1 otherwise; the address
  // MSB carries the sample that multiplies c_0.
  function automatic logic signed [7:0] comb_rom_word(input int unsigned addr);
    int acc;
    acc = 0;
    for (int i = 0; i < 6; i++)
      acc += ((addr >> (5 - i)) & 1) != 0 ? COMB4_C[i] : -COMB4_C[i];
    return 8'(acc);
  endfunction

  localparam int HBF1_C [6] = '{134, 138, -1039, -1328, 4721, 13757};
  localparam int HBF2_C [11] = '{7, 23, -28, -167, 9, 642, 289, -1812, -1617, 5257, 13781};
  localparam int HBF3_C [58] = '{
    -2, 4, 28, 31, -38, -84, 49, 188, -40, -364,
    -17, 638, 161, -1037, -452, 1587, 973, -2304, -1829, 3195,
    3152, -4243, -5101, 5405, 7864, -6602, -11650, 7707, 16691, -8543,
    -23240, 8865, 31568, -8356, -41969, 6611, 54770, -3115, -70360, -2795,
    89240, 11994, -112126, -25704, 140147, 45765, -175261, -75225, 221188, 119804,
    -285839, -192054, 389013, 326684, -596469, -669424, 1326379, 3698868};

  // First-half coefficient idx of half-band filter `stage` (1, 2 or 3).
  function automatic int hbf_coef(input int stage, input int idx);
    case (stage)
      1:       return (idx < 6)  ? HBF1_C[idx] : 0;
      2:       return (idx < 11) ? HBF2_C[idx] : 0;
      default: return (idx < 58) ? HBF3_C[idx] : 0;
    endcase
  endfunction

  // Width in which the tables above are stored: 16, 16 and 24 bits.
  function automatic int hbf_native_w(input int stage);
    return (stage == 3) ? 24 : 16;
  endfunction

  // The same coefficient at another width cw (cw - 1 fraction bits): the
  // stored value rounded to the nearest multiple of 2^(native - cw), ties
  // upwards, when cw is narrower, or shifted left when it is wider. With
  // cw = 8 this gives the short-coefficient versions of the filters.
  function automatic int hbf_coef_q(input int stage, input int idx, input int cw);
    int c, s;
    c = hbf_coef(stage, idx);
    s = hbf_native_w(stage) - cw;
    if (s > 0) return (c + (1 <<< (s - 1))) >>> s;
    return c <<< (-s);
  endfunction

endpackage
