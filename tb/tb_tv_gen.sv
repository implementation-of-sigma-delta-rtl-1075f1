// tb_tv_gen: for several levels (including both extremes and 0) counts the
// ones the generator emits over 2^16 enabled cycles; a first-order
// accumulator of period 2^16 must emit exactly level + 2^15 ones. Also checks
// that the output holds while en is low and that an all-zero level gives an
// alternating pattern.
module tb_tv_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] level = '0;
  logic bit_out;
  int checks = 0, failures = 0;

  tv_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8 * 70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic signed [15:0] LEVELS [6] = '{16'sd0, 16'sd12345, -16'sd20000, 16'sh7fff, -16'sh8000, 16'sd1};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (LEVELS[k]) begin
      automatic int ones = 0;
      automatic logic held;
      level <= LEVELS[k];
      en    <= 1'b1;
      @(posedge clk);
      for (int t = 0; t < 65536; t++) begin
        @(posedge clk);
        #1;
        ones += int'(bit_out);
      end
      checks++;
      if (ones != int'(LEVELS[k]) + 32768) begin
        failures++;
        $display("level %0d: %0d ones, expected %0d", LEVELS[k], ones, int'(LEVELS[k]) + 32768);
      end
      // hold while disabled
      en <= 1'b0;
      @(posedge clk);
      #1 held = bit_out;
      repeat (5) begin
        @(posedge clk);
        #1 checks++;
        if (bit_out !== held) begin failures++; $display("output changed while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
