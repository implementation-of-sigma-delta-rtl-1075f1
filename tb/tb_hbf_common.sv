// tb_hbf_common: shared stimulus and checking for one half-band filter
// configuration. Random samples within the comb full scale (+-2^20), a
// positive and a negative full-scale step, arrive every IN_GAP clocks as in
// the complete chain. Every output is compared with the filter equation
// evaluated by ref_pkg::hbf_ref (direct convolution of the whole input with
// the full symmetric impulse response, rounding, saturation). Also checks
// one output per two inputs, the latency of ceil(N_TAPS/2) + 2 cycles and
// the settled DC gain on the steps (unity for the full-width tables). CW
// below the stored width (16, or 24 for filter 3) tests the short-coefficient
// build; the reference then rounds the taps itself. The wrapper that
// instantiates this module reads done, n_checks and n_failures, prints the
// result and keeps the watchdog.
module tb_hbf_common #(
  parameter int STAGE  = 1,
  parameter int N_TAPS = 12,
  parameter int CW     = 16,
  parameter int MUL_W  = 25,
  parameter int ACC_W  = 42,
  parameter int IN_GAP = 16,
  parameter int N_IN   = 1000
) (
  output logic done,
  output int   n_checks,
  output int   n_failures
);
  import sdadc_pkg::*;
  import ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [SMP_W-1:0] in_data = '0;
  logic out_valid, busy;
  logic signed [SMP_W-1:0] out_data;
  int checks = 0, failures = 0;
  logic finished = 1'b0;

  assign done       = finished;
  assign n_checks   = checks;
  assign n_failures = failures;

  hbf_decim #(.STAGE(STAGE), .N_TAPS(N_TAPS), .CW(CW), .MUL_W(MUL_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  lq_t xin, got;
  int unsigned cyc = 0, last_in = 0, n_in = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      n_in <= n_in + 1;
      if (n_in % 2 == 1) last_in <= cyc;
    end
    if (rst_n && out_valid) begin
      got.push_back(longint'(out_data));
      checks++;
      if (cyc - last_in != (N_TAPS + 1) / 2 + 2) begin
        failures++;
        $display("latency %0d", cyc - last_in);
      end
    end
  end

  initial begin
    lq_t exp_q, h;
    longint dc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N_IN; n++) begin
      logic signed [SMP_W-1:0] s;
      if (n < N_IN / 4)          s = 24'sd1048576;
      else if (n < N_IN / 2)     s = -24'sd1048576;
      else                       s = 24'($signed($urandom_range(0, 2097152)) - 1048576);
      xin.push_back(longint'(s));
      in_valid <= 1'b1;
      in_data  <= s;
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (IN_GAP - 1) @(posedge clk);
    end
    repeat (N_TAPS + 10) @(posedge clk);
    exp_q = hbf_ref(xin, STAGE, N_TAPS, CW - 1, SMP_W, CW);
    h = hbf_taps(STAGE, N_TAPS, CW);
    dc = 0;
    foreach (h[i]) dc += h[i];
    dc = (dc * 1048576) >>> (CW - 1);
    checks++;
    if (got.size() != exp_q.size()) begin failures++; $display("%0d outputs, expected %0d", got.size(), exp_q.size()); end
    for (int i = 0; i < got.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got[i] != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("out[%0d]=%0d expected %0d", i, got[i], exp_q[i]);
      end
    end
    // settled DC gain on the steps: the sum of the taps (1 within 0.01 %
    // for the full-width tables), within 0.01 % of full scale
    checks += 3;
    if (CW >= 16 && (dc - 1048576 > 105 || 1048576 - dc > 105)) begin
      failures++; $display("DC gain of the taps: %0d", dc);
    end
    if (got[N_IN / 8 - 1] - dc > 105 || dc - got[N_IN / 8 - 1] > 105) begin
      failures++; $display("DC gain + : %0d", got[N_IN / 8 - 1]);
    end
    if (got[N_IN / 4 - 1] + dc > 105 || -dc - got[N_IN / 4 - 1] > 105) begin
      failures++; $display("DC gain - : %0d", got[N_IN / 4 - 1]);
    end
    finished = 1'b1;
  end
endmodule
