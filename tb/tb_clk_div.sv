// tb_clk_div: checks over several frames that bclk toggles every MCLK
// cycle (64 fs), lrclk is low for the first and high for the second 64
// cycles of each 128-cycle frame, slot counts 0..63 and frame_last is high
// exactly once per frame, in its last cycle.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bclk, lrclk, frame_last;
  logic [5:0] slot;
  int checks = 0, failures = 0;

  clk_div dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lasts = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff frame_last);  // counter is 0 after this edge
    for (int t = 0; t < 128 * 8; t++) begin
      #1;
      checks += 4;
      if (bclk !== 1'(t % 2))               begin failures++; $display("t=%0d bclk", t); end
      if (lrclk !== ((t % 128) >= 64))      begin failures++; $display("t=%0d lrclk", t); end
      if (slot !== 6'((t % 128) / 2))       begin failures++; $display("t=%0d slot %0d", t, slot); end
      if (frame_last !== (t % 128 == 127))  begin failures++; $display("t=%0d frame_last", t); end
      if (frame_last) lasts++;
      @(posedge clk);
    end
    checks++;
    if (lasts != 8) begin failures++; $display("frames %0d", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
