// tb_adc_channel: one channel fed by the modulator model (1 kHz sine at half
// of full scale). Every output of every stage - comb, HBF1, HBF2, HBF3 - is
// compared exactly with the reference chain computed from the recorded bit
// stream. Also checks the rates: 16, 32, 64 and 128 clocks between outputs
// of the four stages in steady state, and that the HBF3 output swings to
// about half of full scale (within 2 %).
module tb_adc_channel;
  import sdadc_pkg::*;
  import ref_pkg::*;

  localparam int N_CYC = 128 * 400;

  logic clk = 1'b0, rst_n = 1'b0, in_bit;
  logic v [4];
  logic signed [SMP_W-1:0] d [4];
  int checks = 0, failures = 0;

  sdm_model #(.AMP(0.5), .FREQ(1000.0)) u_mod (.clk, .en(rst_n), .bit_out(in_bit));

  adc_channel dut (
    .clk, .rst_n, .in_valid(1'b1), .in_bit,
    .comb_valid(v[0]), .comb_data(d[0]), .hbf1_valid(v[1]), .hbf1_data(d[1]),
    .hbf2_valid(v[2]), .hbf2_data(d[2]), .hbf3_valid(v[3]), .hbf3_data(d[3])
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_CYC + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits[$];
  lq_t got [4];
  int unsigned cyc = 0;
  int unsigned last [4] = '{0, 0, 0, 0};
  localparam int PERIOD [4] = '{16, 32, 64, 128};

  always @(negedge clk) if (rst_n) #1 bits.push_back(in_bit);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int s = 0; s < 4; s++) if (rst_n && v[s]) begin
      if (got[s].size() > 4) begin
        checks++;
        if (cyc - last[s] != PERIOD[s]) begin failures++; $display("stage %0d period %0d", s, cyc - last[s]); end
      end
      last[s] = cyc;
      got[s].push_back(longint'(d[s]));
    end
  end

  initial begin
    lq_t e [4];
    longint peak = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (N_CYC) @(posedge clk);
    e[0] = comb_ref(bits);
    e[1] = hbf_ref(e[0], 1, 12, 15, SMP_W);
    e[2] = hbf_ref(e[1], 2, 22, 15, SMP_W);
    e[3] = hbf_ref(e[2], 3, 116, 23, SMP_W);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (got[s].size() + 1 < e[s].size() || got[s].size() > e[s].size()) begin
        failures++; $display("stage %0d: %0d outputs, reference %0d", s, got[s].size(), e[s].size());
      end
      for (int i = 0; i < got[s].size() && i < e[s].size(); i++) begin
        checks++;
        if (got[s][i] != e[s][i]) begin
          failures++;
          if (failures < 10) $display("stage %0d out[%0d]=%0d expected %0d", s, i, got[s][i], e[s][i]);
        end
      end
    end
    for (int i = 100; i < got[3].size(); i++) if (got[3][i] > peak) peak = got[3][i];
    checks++;
    if (peak < 513802 || peak > 534774) begin failures++; $display("sine peak %0d", peak); end
    $display("stage outputs: comb %0d hbf1 %0d hbf2 %0d hbf3 %0d, peak %0d",
             got[0].size(), got[1].size(), got[2].size(), got[3].size(), peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
