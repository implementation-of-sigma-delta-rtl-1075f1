// tb_comb_intdiff: drives 32 fs words (one every 4 clocks) into the
// integrator/differentiator comb and compares every 8 fs output with the
// reference (1+z^-1)^5, down-sample 2, (1+z^-1)^7, down-sample 2. The first
// 200 inputs are +256 (positive full scale), which makes the integrators
// wrap around many times and must still give exactly 2^20; random inputs
// follow. Also checks one output per four inputs and the output latency.
module tb_comb_intdiff;
  import sdadc_pkg::*;
  import ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [H1_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [COMB_W-1:0] out_data;
  int checks = 0, failures = 0;

  comb_intdiff dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lq_t xin, got;
  int unsigned cyc = 0, last_in = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) last_in <= cyc;
    if (rst_n && out_valid) begin
      got.push_back(longint'(out_data));
      checks++;
      if (cyc - last_in != 3) begin failures++; $display("latency %0d", cyc - last_in); end
    end
  end

  initial begin
    lq_t exp_q;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic signed [H1_W-1:0] v;
      v = (n < 200) ? 10'sd256 : 10'($signed($urandom_range(0, 512)) - 256);
      xin.push_back(longint'(v));
      in_valid <= 1'b1;
      in_data  <= v;
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    exp_q = downsample(binom_ref(downsample(binom_ref(xin, 5), 2), 7), 2);
    checks++;
    if (got.size() != exp_q.size()) begin failures++; $display("outputs %0d expected %0d", got.size(), exp_q.size()); end
    for (int i = 0; i < got.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got[i] != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("out[%0d]=%0d expected %0d", i, got[i], exp_q[i]);
      end
    end
    checks++;
    if (got[40] != 1048576) begin failures++; $display("full scale %0d", got[40]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
