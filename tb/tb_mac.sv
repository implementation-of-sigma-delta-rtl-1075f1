// tb_mac: random signed operands at the extremes and in between, random
// clear and enable, checked against a running 48-bit sum kept by the
// testbench, one cycle after each enabled edge.
module tb_mac;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic signed [31:0] a = '0;
  logic signed [23:0] b = '0;
  logic signed [47:0] acc;
  int checks = 0, failures = 0;

  mac dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 5000; t++) begin
      logic e, c;
      logic signed [31:0] x;
      logic signed [23:0] y;
      e = ($urandom_range(0, 4) != 0);
      c = ($urandom_range(0, 9) == 0);
      x = 32'($signed($urandom_range(0, 1 << 26)) - (1 << 25));
      y = 24'($urandom);
      if (t % 97 == 0) y = 24'sh800000;                       // most negative coefficient
      @(negedge clk);
      en = e; clr = c; a = x; b = y;
      @(posedge clk);
      if (e) model = (c ? 0 : model) + longint'(x) * longint'(y);
      model = (model <<< 16) >>> 16;                          // wrap to 48 bits
      #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 10) $display("t=%0d acc %0d expected %0d", t, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
