// tb_binom_fir: random input words with random gaps into two binom_fir instances,
// (1+z^-1)^5 on 10-bit words and (1+z^-1)^7 on 15-bit words, and checks every
// output in the same cycle against a direct convolution with the binomial
// coefficients computed by the testbench; full-scale inputs check the width.
module tb_binom_fir;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [9:0]  a_in = '0;
  logic signed [14:0] b_in = '0;
  logic a_v, b_v;
  logic signed [14:0] a_out;
  logic signed [21:0] b_out;
  int checks = 0, failures = 0;

  binom_fir #(.K(5), .IN_W(10), .OUT_W(15)) dut5 (.clk, .rst_n, .in_valid, .in_data(a_in), .out_valid(a_v), .out_data(a_out));
  binom_fir #(.K(7), .IN_W(15), .OUT_W(22)) dut7 (.clk, .rst_n, .in_valid, .in_data(b_in), .out_valid(b_v), .out_data(b_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ha [6], hb [8];
  localparam longint C5 [6] = '{1, 5, 10, 10, 5, 1};
  localparam longint C7 [8] = '{1, 7, 21, 35, 35, 21, 7, 1};

  initial begin
    foreach (ha[i]) ha[i] = 0;
    foreach (hb[i]) hb[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic v;
      logic signed [9:0] x;
      logic signed [14:0] y;
      longint ea, eb;
      v = ($urandom_range(0, 3) != 0);
      x = (t < 50) ? 10'sd256 : ((t < 100) ? -10'sd256 : 10'($signed($urandom_range(0, 512)) - 256));
      y = (t < 50) ? 15'sd8192 : ((t < 100) ? -15'sd8192 : 15'($signed($urandom_range(0, 16384)) - 8192));
      @(negedge clk);
      in_valid = v; a_in = x; b_in = y;
      #1;
      ea = C5[0] * x; for (int i = 1; i < 6; i++) ea += C5[i] * ha[i-1];
      eb = C7[0] * y; for (int i = 1; i < 8; i++) eb += C7[i] * hb[i-1];
      checks += 2;
      if (a_v !== v || b_v !== v) begin failures++; $display("valid mismatch"); end
      if (v) begin
        checks += 2;
        if (longint'(a_out) != ea) begin failures++; if (failures < 10) $display("t=%0d K5 %0d exp %0d", t, a_out, ea); end
        if (longint'(b_out) != eb) begin failures++; if (failures < 10) $display("t=%0d K7 %0d exp %0d", t, b_out, eb); end
        for (int i = 5; i > 0; i--) ha[i] = ha[i-1];
        ha[0] = x;
        for (int i = 7; i > 0; i--) hb[i] = hb[i-1];
        hb[0] = y;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
