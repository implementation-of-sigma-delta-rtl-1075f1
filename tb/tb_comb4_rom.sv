// tb_comb4_rom: drives random modulator bits (with gaps in in_valid) into
// comb4_rom and checks every output against the 13-tap comb equation
// evaluated on the testbench's own copy of the bit history, and that the
// output follows the input strobe by one cycle.
module tb_comb4_rom;
  import sdadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid;
  logic signed [H1_W-1:0] out_data;
  int checks = 0, failures = 0;

  comb4_rom dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [13];
  int exp_val;
  bit pend;

  initial begin
    for (int k = 0; k < 13; k++) hist[k] = (k % 2 == 0);  // reset pattern, hist[0] newest
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // after reset with no input the output is 0
    checks++;
    if (out_data !== '0) begin failures++; $display("reset output %0d", out_data); end
    for (int t = 0; t < 5000; t++) begin
      logic v, b;
      v = (t < 300) ? 1'b1 : ($urandom_range(0, 3) != 0);
      b = (t < 100) ? 1'b1 : ((t < 200) ? 1'b0 : 1'($urandom));
      in_valid <= v;
      in_bit   <= b;
      @(posedge clk);
      if (v) begin
        for (int k = 12; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = b;
        exp_val = 0;
        for (int k = 0; k < 13; k++) exp_val += hist[k] ? COMB4_C[k] : -COMB4_C[k];
      end
      #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("t=%0d out_valid %b expected %b", t, out_valid, v); end
      if (v) begin
        checks++;
        if (int'(out_data) !== exp_val) begin
          failures++;
          if (failures < 10) $display("t=%0d out %0d expected %0d", t, out_data, exp_val);
        end
        if (t == 99) begin  // 100 ones: positive full scale
          checks++;
          if (out_data !== 10'sd256) begin failures++; $display("full scale %0d", out_data); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
