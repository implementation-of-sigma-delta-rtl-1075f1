// tb_tone_response: frequency behaviour of the whole decimation chain. Four
// channels are fed by modulator models with sines at half of full scale:
//   1 kHz and 18 kHz (audio band): the output amplitude, fitted at the
//     input frequency, must equal the input amplitude times the comb droop
//     |H1 H2 H3| at that frequency, computed here from the comb equation,
//     within 1 %;
//   30 kHz and 60 kHz (above the 24 kHz output Nyquist frequency, where the
//     half-band filters must remove them before they alias): the output
//     must stay below 1e-4 of full scale (80 dB rejection).
// The measured amplitudes are printed.
module tb_tone_response;
  import sdadc_pkg::*;

  localparam int  N_OUT   = 450;
  localparam int  SKIP    = 150;
  localparam real FREQ [4] = '{1000.0, 18000.0, 30000.0, 60000.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic bits [4];
  logic v [4];
  logic signed [SMP_W-1:0] d [4];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_ch
    logic cv, h1v, h2v;
    logic signed [SMP_W-1:0] cd, h1d, h2d;
    sdm_model #(.AMP(0.5), .FREQ(FREQ[k])) u_mod (.clk, .en(rst_n), .bit_out(bits[k]));
    adc_channel dut (
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

  // Peak of |output| and, over N_FIT outputs (a whole number of periods of
  // the 1 kHz and 18 kHz tones at 48 kHz), the sine/cosine correlation sums
  // that give the amplitude at the input frequency independently of where
  // the samples fall on the waveform.
  localparam int N_FIT = 288;
  longint peak [4] = '{0, 0, 0, 0};
  real    cs [4] = '{0.0, 0.0, 0.0, 0.0};
  real    sn [4] = '{0.0, 0.0, 0.0, 0.0};
  int n [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) if (v[k]) begin
      longint a;
      a = (d[k] < 0) ? -longint'(d[k]) : longint'(d[k]);
      if (n[k] >= SKIP && a > peak[k]) peak[k] = a;
      if (n[k] >= SKIP && n[k] < SKIP + N_FIT) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * FREQ[k] * real'(n[k]) / 48000.0;
        cs[k] += real'(d[k]) * $cos(ph);
        sn[k] += real'(d[k]) * $sin(ph);
      end
      n[k]++;
    end
  end

  // |H1 H2 H3| at f: H1 = (sin 4x / 4 sin x)^4 with x = pi f / 6.144 MHz,
  // H2 = cos(pi f / 1.536 MHz)^5, H3 = cos(pi f / 768 kHz)^7 (DC gain 1).
  function automatic real droop(input real f);
    real x, h1;
    x  = 3.14159265358979 * f / 6.144e6;
    h1 = $sin(4.0 * x) / (4.0 * $sin(x));
    return (h1 ** 4) * ($cos(3.14159265358979 * f / 1.536e6) ** 5) * ($cos(3.14159265358979 * f / 768.0e3) ** 7);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n[0] >= N_OUT && n[3] >= N_OUT);
    for (int k = 0; k < 4; k++) begin
      real rel, amp;
      rel = real'(peak[k]) / 1048576.0;
      amp = 2.0 / real'(N_FIT) * $sqrt(cs[k] * cs[k] + sn[k] * sn[k]) / 1048576.0;
      $display("%0.0f Hz: output peak %0d = %0.6f of full scale (%0.1f dBFS), fitted amplitude %0.6f",
               FREQ[k], peak[k], rel, 20.0 * $log10(rel + 1.0e-12), amp);
      checks++;
      if (k < 2) begin
        real e;
        e = 0.5 * droop(FREQ[k]);
        rel = amp;
        if (rel < 0.99 * e || rel > 1.01 * e) begin failures++; $display("  expected %0.6f", e); end
      end else begin
        if (rel > 1.0e-4) begin failures++; $display("  not rejected"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
