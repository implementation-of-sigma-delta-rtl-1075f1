// tb_decim: feeds a counting sequence with random gaps into two down-samplers
// (by 4 and by 2) and checks that exactly samples M-1, 2M-1, ... come out,
// one cycle after they were presented, and nothing else.
module tb_decim;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] in_data = '0;
  logic v4, v2;
  logic signed [15:0] d4, d2;
  int checks = 0, failures = 0;

  decim #(.W(16), .M(4)) dut4 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v4), .out_data(d4));
  decim #(.W(16), .M(2)) dut2 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v2), .out_data(d2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, kept4 = 0, kept2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 4000; t++) begin
      logic v;
      v = ($urandom_range(0, 2) != 0);
      in_valid <= v;
      in_data  <= 16'(n);
      @(posedge clk);
      #1;
      checks += 2;
      if (v4 !== (v && (n % 4 == 3))) begin failures++; $display("n=%0d v4=%b", n, v4); end
      if (v2 !== (v && (n % 2 == 1))) begin failures++; $display("n=%0d v2=%b", n, v2); end
      if (v4) begin checks++; kept4++; if (d4 !== 16'(n)) begin failures++; $display("d4=%0d n=%0d", d4, n); end end
      if (v2) begin checks++; kept2++; if (d2 !== 16'(n)) begin failures++; $display("d2=%0d n=%0d", d2, n); end end
      if (v) n++;
    end
    checks++;
    if (kept4 != n / 4 || kept2 != n / 2) begin failures++; $display("kept %0d %0d of %0d", kept4, kept2, n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
