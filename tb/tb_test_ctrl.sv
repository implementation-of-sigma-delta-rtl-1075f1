// tb_test_ctrl: walks through all 16 test modes. For each it checks the
// input multiplexer against random modulator and generator bits, then offers
// random samples (and full-scale values that must saturate) on all four
// stage inputs with random valid strobes and checks that pcm takes only the
// selected stage's samples, shifted right by 3 and saturated to 18 bits.
module tb_test_ctrl;
  import sdadc_pkg::*;
  import ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] test_mode = '0;
  logic sdm_bit = 1'b0, gen_bit = 1'b0, in_bit;
  logic [3:0] stage_valid = '0;
  logic signed [SMP_W-1:0] stage_data [4];
  logic signed [PCM_W-1:0] pcm;
  int checks = 0, failures = 0;

  test_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected = 0;
    foreach (stage_data[i]) stage_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 16; m++) begin
      @(negedge clk);
      test_mode = 4'(m);
      stage_valid = '0;
      for (int t = 0; t < 200; t++) begin
        logic e;
        @(negedge clk);
        sdm_bit = 1'($urandom);
        gen_bit = 1'($urandom);
        #1;
        case (m / 4)
          0: e = sdm_bit;
          1: e = gen_bit;
          2: e = 1'b1;
          default: e = 1'b0;
        endcase
        checks++;
        if (in_bit !== e) begin failures++; $display("mode %0d input %b expected %b", m, in_bit, e); end
      end
      for (int t = 0; t < 300; t++) begin
        int sel;
        @(negedge clk);
        sel = m % 4;  // 0 HBF3, 1 comb, 2 HBF1, 3 HBF2
        for (int s = 0; s < 4; s++) begin
          stage_valid[s] = ($urandom_range(0, 2) == 0);
          case (t % 5)
            0: stage_data[s] = 24'sd1048576;    // +full scale: saturates
            1: stage_data[s] = -24'sd1048577;   // below -full scale: saturates
            default: stage_data[s] = 24'($signed($urandom_range(0, 2097152)) - 1048576);
          endcase
        end
        if (stage_valid[sel]) expected = to_pcm(longint'(stage_data[sel]));
        @(posedge clk);
        #1;
        checks++;
        if (longint'(pcm) != expected) begin
          failures++;
          if (failures < 10) $display("mode %0d pcm %0d expected %0d", m, pcm, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
