// tb_i2s_tx: a receiver in the testbench samples sdata on rising bclk,
// follows lrclk and rebuilds the 18-bit words (I2S: MSB one bit clock after
// the lrclk edge). Random word pairs, including both extremes, are offered
// every frame; each decoded pair must equal the pair captured at the start
// of its frame (pcm_l/pcm_r), which in turn must equal the words offered in
// the previous frame. Padding bits must be zero and pcm_valid must come
// every 128 cycles.
module tb_i2s_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [17:0] in_l = '0, in_r = '0;
  logic bclk, lrclk, sdata, pcm_valid;
  logic signed [17:0] pcm_l, pcm_r;
  int checks = 0, failures = 0;

  i2s_tx dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (128 * 60) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: new words right after every capture
  logic signed [17:0] offered_l, offered_r, sent_l, sent_r;
  int frames = 0;
  int unsigned cyc = 0, last_pv = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && pcm_valid) begin
      frames++;
      checks += 2;
      if (frames > 1 && (pcm_l !== offered_l || pcm_r !== offered_r)) begin
        failures++; $display("capture mismatch");
      end
      if (frames > 2 && cyc - last_pv != 128) begin failures++; $display("frame period %0d", cyc - last_pv); end
      last_pv <= cyc;
      sent_l = pcm_l;
      sent_r = pcm_r;
      offered_l = (frames == 3) ? 18'sh1ffff : (frames == 4) ? -18'sh20000 : 18'($urandom);
      offered_r = (frames == 3) ? -18'sh20000 : (frames == 4) ? 18'sh1ffff : 18'($urandom);
      in_l <= offered_l;
      in_r <= offered_r;
    end
  end

  // receiver: p counts bit clocks within a half-frame, p = 0 at the lrclk change
  logic prev_lr = 1'b0;
  int   p = 0;
  logic [17:0] word = '0;
  logic signed [17:0] exp_l, exp_r;
  int words = 0;

  always @(posedge bclk) begin
    if (lrclk !== prev_lr) begin
      if (words > 2) begin
        checks++;
        if (prev_lr == 1'b0 && $signed(word) !== exp_l) begin failures++; $display("left %h expected %h", word, exp_l); end
        if (prev_lr == 1'b1 && $signed(word) !== exp_r) begin failures++; $display("right %h expected %h", word, exp_r); end
      end
      words++;
      p = 0;
      if (lrclk == 1'b0) begin exp_l = sent_l; exp_r = sent_r; end
    end else begin
      p++;
    end
    if (p >= 1 && p <= 18) word[18 - p] = sdata;
    else if (words > 2) begin
      checks++;
      if (sdata !== 1'b0) begin failures++; $display("padding bit %0d not zero", p); end
    end
    prev_lr = lrclk;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (128 * 50) @(posedge clk);
    checks++;
    if (words < 90) begin failures++; $display("only %0d words", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
