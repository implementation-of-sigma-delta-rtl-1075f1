// tb_coef_width: the decimation chain built with 16/16/24-bit half-band
// coefficients (the default) against the same chain with 8-bit coefficients,
// which trade stopband rejection for a smaller multiplier. Four channels are
// fed by modulator models with sines at half of full scale:
//   1 kHz, both widths: the output amplitude, fitted at 1 kHz, must equal
//     0.5 x comb droop x |HBF1 HBF2 HBF3| at 1 kHz within 0.5 %. The
//     half-band gains are computed here from the coefficient tables, rounded
//     to the width under test (ties upwards), so the 8-bit passband error
//     (about +0.23 dB) is part of the expectation;
//   30 kHz, both widths: the tone lies in the last filter's stopband and
//     aliases to 48 - 30 = 18 kHz. With 8-bit coefficients the fitted 18 kHz
//     amplitude must match the predicted leak (about -45 dBFS) within 5 %;
//     with full-width coefficients it must stay below 1e-4 of full scale.
// The fitted amplitudes and predictions are printed. The modulator model's
// own noise limits how far below -80 dBFS the full-width result can be
// measured.
module tb_coef_width;
  import sdadc_pkg::*;

  localparam int  N_OUT = 450;
  localparam int  SKIP  = 150;
  localparam int  N_FIT = 288;  // whole periods of 1 kHz and 18 kHz at 48 kHz
  localparam real PI    = 3.14159265358979;
  localparam real FREQ [4] = '{1000.0, 1000.0, 30000.0, 30000.0};
  localparam int  SHORT [4] = '{0, 1, 0, 1};  // 1: 8-bit coefficients

  logic clk = 1'b0, rst_n = 1'b0;
  logic bits [4];
  logic v [4];
  logic signed [SMP_W-1:0] d [4];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_ch
    localparam int unsigned W1 = SHORT[k] ? 8 : 16;
    localparam int unsigned W2 = SHORT[k] ? 8 : 16;
    localparam int unsigned W3 = SHORT[k] ? 8 : 24;
    logic cv, h1v, h2v;
    logic signed [SMP_W-1:0] cd, h1d, h2d;
    sdm_model #(.AMP(0.5), .FREQ(FREQ[k])) u_mod (.clk, .en(rst_n), .bit_out(bits[k]));
    adc_channel #(.HBF1_CW(W1), .HBF2_CW(W2), .HBF3_CW(W3)) dut (
      .clk, .rst_n, .in_valid(1'b1), .in_bit(bits[k]),
      .comb_valid(cv), .comb_data(cd), .hbf1_valid(h1v), .hbf1_data(h1d),
      .hbf2_valid(h2v), .hbf2_data(h2d), .hbf3_valid(v[k]), .hbf3_data(d[k])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (128 * (N_OUT + 20)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Correlation sums at the frequency where each tone appears in the output.
  real cs [4] = '{0.0, 0.0, 0.0, 0.0};
  real sn [4] = '{0.0, 0.0, 0.0, 0.0};
  int  n [4]  = '{0, 0, 0, 0};

  function automatic real out_freq(input real f);
    return (f > 24000.0) ? 48000.0 - f : f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) if (v[k]) begin
      if (n[k] >= SKIP && n[k] < SKIP + N_FIT) begin
        real ph;
        ph = 2.0 * PI * out_freq(FREQ[k]) * real'(n[k]) / 48000.0;
        cs[k] += real'(d[k]) * $cos(ph);
        sn[k] += real'(d[k]) * $sin(ph);
      end
      n[k]++;
    end
  end

  // Comb droop |H1 H2 H3| at f (DC gain 1).
  function automatic real droop(input real f);
    real x, h1;
    x  = PI * f / 6.144e6;
    h1 = $sin(4.0 * x) / (4.0 * $sin(x));
    return (h1 ** 4) * ($cos(PI * f / 1.536e6) ** 5) * ($cos(PI * f / 768.0e3) ** 7);
  endfunction

  // |H(f)| of a half-band filter: taps h[i] = h[N-1-i] = c_i for the first
  // half, each coefficient rounded to cw bits (cw - 1 fraction bits) from
  // the stored table of width nw. For a symmetric filter the response is
  // sum over pairs of 2 c_i cos(w (i - (N-1)/2)), plus the middle tap for odd N.
  function automatic real hbf_mag(input int stage, input int n_taps, input int nw,
                                  input int cw, input real f, input real rate);
    real w, sum, c;
    w   = 2.0 * PI * f / rate;
    sum = 0.0;
    for (int i = 0; i < (n_taps + 1) / 2; i++) begin
      c = $floor(real'(hbf_coef(stage, i)) / real'(2 ** (nw - cw)) + 0.5);
      if (2 * i == n_taps - 1) sum += c;
      else sum += 2.0 * c * $cos(w * (real'(i) - real'(n_taps - 1) / 2.0));
    end
    return ((sum < 0.0) ? -sum : sum) / real'(2 ** (cw - 1));
  endfunction

  function automatic real chain_gain(input real f, input int short_c);
    return droop(f) *
           hbf_mag(1, 12,  16, short_c ? 8 : 16, f, 384.0e3) *
           hbf_mag(2, 22,  16, short_c ? 8 : 16, f, 192.0e3) *
           hbf_mag(3, 116, 24, short_c ? 8 : 24, f, 96.0e3);
  endfunction

  real fit [4];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n[0] >= N_OUT && n[1] >= N_OUT && n[2] >= N_OUT && n[3] >= N_OUT);
    for (int k = 0; k < 4; k++) begin
      real amp, e;
      amp = 2.0 / real'(N_FIT) * $sqrt(cs[k] * cs[k] + sn[k] * sn[k]) / 1048576.0;
      e   = 0.5 * chain_gain(FREQ[k], SHORT[k]);
      fit[k] = amp;
      $display("%0.0f Hz, %0s coefficients: amplitude at %0.0f Hz %0.7f (%0.1f dBFS), predicted %0.7f (%0.1f dBFS)",
               FREQ[k], SHORT[k] ? "8-bit" : "full-width", out_freq(FREQ[k]), amp,
               20.0 * $log10(amp + 1.0e-12), e, 20.0 * $log10(e));
      checks++;
      if (FREQ[k] < 24000.0) begin
        if (amp < 0.995 * e || amp > 1.005 * e) begin failures++; $display("  passband gain wrong"); end
      end else if (SHORT[k] != 0) begin
        if (amp < 0.95 * e || amp > 1.05 * e) begin failures++; $display("  stopband leak wrong"); end
      end else begin
        if (amp > 1.0e-4) begin failures++; $display("  not rejected"); end
      end
    end
    // The 8-bit chain must leak at least 100 times (40 dB) more at 30 kHz.
    checks++;
    if (fit[3] < 100.0 * fit[2]) begin failures++; $display("  8-bit chain not worse in the stopband"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
