// tb_comb_filter: one 1-bit stream (runs of ones, runs of zeros, then random
// bits) drives all three comb structures side by side. Every 8 fs output of
// each is compared with the reference chain H1 (13-tap comb), down-sample 4,
// (1+z^-1)^5, down-sample 2, (1+z^-1)^7, down-sample 2. Checks one output per
// 16 input bits, full scale +-2^20 after the runs, and the output latency
// (4 cycles for the FIR and cascade structures, 5 for the integrator one,
// counted from the clock edge that takes the 16th bit).
module tb_comb_filter;
  import sdadc_pkg::*;
  import ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic v [3];
  logic signed [COMB_W-1:0] d [3];
  int checks = 0, failures = 0;

  comb_filter #(.COMB_ARCH(COMB_INTDIFF)) dut1 (.clk, .rst_n, .in_valid, .in_bit, .out_valid(v[0]), .out_data(d[0]));
  comb_filter #(.COMB_ARCH(COMB_FIR))     dut2 (.clk, .rst_n, .in_valid, .in_bit, .out_valid(v[1]), .out_data(d[1]));
  comb_filter #(.COMB_ARCH(COMB_CASCADE)) dut3 (.clk, .rst_n, .in_valid, .in_bit, .out_valid(v[2]), .out_data(d[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits[$];
  lq_t got [3];
  int unsigned cyc = 0, last16 = 0, nbits = 0;
  localparam int LAT [3] = '{5, 4, 4};

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      nbits <= nbits + 1;
      if (nbits % 16 == 15) last16 <= cyc;
    end
    for (int a = 0; a < 3; a++) if (rst_n && v[a]) begin
      got[a].push_back(longint'(d[a]));
      checks++;
      if (cyc - last16 != LAT[a]) begin failures++; $display("arch %0d latency %0d", a + 1, cyc - last16); end
    end
  end

  initial begin
    lq_t exp_q;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 16 * 1500; n++) begin
      bit b;
      b = (n < 1600) ? 1'b1 : (n < 3200) ? 1'b0 : 1'($urandom);
      bits.push_back(b);
      in_valid <= 1'b1;
      in_bit   <= b;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    exp_q = comb_ref(bits);
    for (int a = 0; a < 3; a++) begin
      checks++;
      if (got[a].size() != exp_q.size()) begin failures++; $display("arch %0d: %0d outputs, expected %0d", a + 1, got[a].size(), exp_q.size()); end
      for (int i = 0; i < got[a].size() && i < exp_q.size(); i++) begin
        checks++;
        if (got[a][i] != exp_q[i]) begin
          failures++;
          if (failures < 10) $display("arch %0d out[%0d]=%0d expected %0d", a + 1, i, got[a][i], exp_q[i]);
        end
      end
      checks += 2;
      if (got[a][90] != 1048576)  begin failures++; $display("arch %0d +full scale %0d", a + 1, got[a][90]); end
      if (got[a][190] != -1048576) begin failures++; $display("arch %0d -full scale %0d", a + 1, got[a][190]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
