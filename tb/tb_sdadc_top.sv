// tb_sdadc_top: end-to-end test of the complete two-channel converter at its
// default parameters.
//
// Part 1 (test mode 0, normal operation): the two modulator models send a
// 1 kHz sine at 0.5 and a 3 kHz sine at 0.25 of full scale. The I2S stream
// is decoded by a receiver in the testbench; each decoded word must equal
// the parallel word of its frame, and the sequence of words must equal the
// reference chain (comb, three half-band filters, 18-bit conversion)
// computed from the recorded bit streams, at one fixed frame offset.
//
// Part 2 walks through all 16 test modes with settled expectations: the
// constant +1 / -1 inputs must give full scale at every observation point
// (the comb output, exactly 2^20, saturates the 18-bit word at +131071 /
// -131072; the half-band outputs come within 32 LSB of it), the internal generator at level
// 2^14 must give half of full scale (65536, within 1 %), and the modulator
// input must stay within the sine amplitude.
//
// Mechanisms counted (each must occur): output frames, I2S words decoded,
// decimation stages producing samples at their rates, positive and
// negative saturation, generator input, every observation point and every
// input source, and test-mode switches.
module tb_sdadc_top;
  import sdadc_pkg::*;
  import ref_pkg::*;

  localparam int FRAMES_P1   = 300;
  localparam int FRAMES_MODE = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sdm_l, sdm_r;
  logic [3:0] test_mode = 4'd0;
  logic signed [15:0] gen_level = 16'sd16384;
  logic bclk, lrclk, sdata, pcm_valid;
  logic signed [PCM_W-1:0] pcm_l, pcm_r;
  int checks = 0, failures = 0;

  sdm_model #(.AMP(0.5),  .FREQ(1000.0)) u_mod_l (.clk, .en(rst_n), .bit_out(sdm_l));
  sdm_model #(.AMP(0.25), .FREQ(3000.0)) u_mod_r (.clk, .en(rst_n), .bit_out(sdm_r));

  sdadc_top dut (.*);

  always #81.38 clk = ~clk;  // 6.144 MHz

  initial begin : watchdog
    repeat (128 * (FRAMES_P1 + 16 * (FRAMES_MODE + 10) + 50)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- record the bit streams of part 1 -----------------------------------
  bit bits_l[$], bits_r[$];
  bit recording = 1'b1;
  always @(negedge clk) if (rst_n && recording) #1 begin
    bits_l.push_back(sdm_l);
    bits_r.push_back(sdm_r);
  end

  // ---- frames -------------------------------------------------------------
  lq_t words_l, words_r;
  int frames = 0;
  always @(posedge clk) if (rst_n && pcm_valid) begin
    frames++;
    words_l.push_back(longint'(pcm_l));
    words_r.push_back(longint'(pcm_r));
  end

  // ---- I2S receiver -----------------------------------------------------
  logic prev_lr = 1'b0;
  int   p = 0, i2s_words = 0;
  logic [17:0] word = '0;
  logic signed [17:0] exp_l, exp_r;
  always @(posedge bclk) begin
    if (lrclk !== prev_lr) begin
      if (frames > 2) begin
        checks++;
        i2s_words++;
        if (prev_lr == 1'b0 && $signed(word) !== exp_l) begin failures++; $display("I2S left %0d, word %0d", $signed(word), exp_l); end
        if (prev_lr == 1'b1 && $signed(word) !== exp_r) begin failures++; $display("I2S right %0d, word %0d", $signed(word), exp_r); end
      end
      p = 0;
      if (lrclk == 1'b0) begin exp_l = pcm_l; exp_r = pcm_r; end
    end else begin
      p++;
    end
    if (p >= 1 && p <= 18) word[18 - p] = sdata;
    prev_lr = lrclk;
  end

  // ---- mechanism counters ----------------------------------------------
  int n_sat_pos = 0, n_sat_neg = 0, n_gen = 0, n_switch = 0;
  int n_obs [4] = '{0, 0, 0, 0};
  int n_src [4] = '{0, 0, 0, 0};
  int n_stage [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_ch[0].u_ch.comb_valid) n_stage[0]++;
      if (dut.g_ch[0].u_ch.hbf1_valid) n_stage[1]++;
      if (dut.g_ch[0].u_ch.hbf2_valid) n_stage[2]++;
      if (dut.g_ch[0].u_ch.hbf3_valid) n_stage[3]++;
    end
  end

  task automatic wait_frames(input int n);
    repeat (n) @(posedge clk iff pcm_valid);
  endtask

  initial begin
    lq_t e [2];
    int offset;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // ---- part 1: normal operation, exact comparison ----------------------
    wait_frames(FRAMES_P1);
    recording = 1'b0;
    e[0] = comb_ref(bits_l);
    e[1] = comb_ref(bits_r);
    for (int c = 0; c < 2; c++) begin
      e[c] = hbf_ref(hbf_ref(hbf_ref(e[c], 1, 12, 15, SMP_W), 2, 22, 15, SMP_W), 3, 116, 23, SMP_W);
      for (int i = 0; i < e[c].size(); i++) e[c][i] = to_pcm(e[c][i]);
    end
    // find the fixed latency (in frames) from the first settled word
    offset = -1;
    for (int d = 0; d < 4 && offset < 0; d++)
      if (words_l[100] == e[0][100 - d] && words_l[101] == e[0][101 - d]) offset = d;
    checks++;
    if (offset < 0) begin failures++; $display("no frame alignment found"); offset = 0; end
    for (int f = 10; f < FRAMES_P1 - 2; f++) begin
      checks += 2;
      if (words_l[f] != e[0][f - offset]) begin failures++; if (failures < 10) $display("frame %0d left %0d expected %0d", f, words_l[f], e[0][f - offset]); end
      if (words_r[f] != e[1][f - offset]) begin failures++; if (failures < 10) $display("frame %0d right %0d expected %0d", f, words_r[f], e[1][f - offset]); end
    end
    n_obs[OBS_HBF3]++;
    n_src[SRC_MOD]++;

    // ---- part 2: all 16 test modes -----------------------------------------
    for (int m = 1; m <= 16; m++) begin
      test_src_e src;
      test_obs_e obs;
      logic [3:0] mode;
      mode = 4'(m);  // 16 wraps to mode 0
      src  = test_src_e'(mode[3:2]);
      obs  = test_obs_e'(mode[1:0]);
      test_mode <= mode;
      n_switch++;
      wait_frames(FRAMES_MODE);
      for (int k = 0; k < 10; k++) begin
        wait_frames(1);
        n_obs[obs]++;
        n_src[src]++;
        checks += 2;
        case (src)
          SRC_ONE: begin
            if (pcm_l < 18'sd131040 || pcm_r != pcm_l) begin failures++; $display("mode %0d: +1 gives %0d %0d", m, pcm_l, pcm_r); end
            if (pcm_l == 18'sd131071) n_sat_pos++;
          end
          SRC_ZERO: begin
            if (pcm_l > -18'sd131040 || pcm_r != pcm_l) begin failures++; $display("mode %0d: -1 gives %0d %0d", m, pcm_l, pcm_r); end
            if (pcm_l == -18'sd131072) n_sat_neg++;
          end
          SRC_GEN: begin
            if (pcm_l < 64881 || pcm_l > 66191 || pcm_r != pcm_l) begin failures++; $display("mode %0d: generator gives %0d %0d", m, pcm_l, pcm_r); end
            else n_gen++;
          end
          default: begin
            if (pcm_l > 72000 || pcm_l < -72000 || pcm_r > 36000 || pcm_r < -36000) begin
              failures++; $display("mode %0d: modulator gives %0d %0d", m, pcm_l, pcm_r);
            end
          end
        endcase
      end
    end

    // ---- mechanisms ------------------------------------------------------
    begin
      int total;
      total = frames;
      checks += 6;
      if (n_sat_pos == 0) begin failures++; $display("positive saturation never seen"); end
      if (n_sat_neg == 0) begin failures++; $display("negative saturation never seen"); end
      if (n_gen == 0)     begin failures++; $display("generator never checked"); end
      if (n_switch != 16) begin failures++; $display("mode switches %0d", n_switch); end
      if (i2s_words < 2 * (total - 4)) begin failures++; $display("I2S words %0d for %0d frames", i2s_words, total); end
      // decimation: stage output counts in the ratios 16:32:64:128 of the clocks
      if (n_stage[0] < 8 * total - 20 || n_stage[1] < 4 * total - 20 || n_stage[2] < 2 * total - 20 || n_stage[3] < total - 20) begin
        failures++; $display("stage outputs %0d %0d %0d %0d for %0d frames", n_stage[0], n_stage[1], n_stage[2], n_stage[3], total);
      end
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (n_obs[k] == 0) begin failures++; $display("observation point %0d never used", k); end
        if (n_src[k] == 0) begin failures++; $display("input source %0d never used", k); end
      end
      $display("frames %0d, I2S words %0d, stage outputs %0d/%0d/%0d/%0d, +sat %0d, -sat %0d, generator %0d, mode switches %0d, offset %0d",
               total, i2s_words, n_stage[0], n_stage[1], n_stage[2], n_stage[3], n_sat_pos, n_sat_neg, n_gen, n_switch, offset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
