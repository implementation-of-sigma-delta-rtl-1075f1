// tb_hbf1: half-band filter 1 (12 taps, an input every 16 clocks as
// in the complete chain), built twice: with the full 16-bit coefficients
// (a 25x16 multiplier) and with the 8-bit short-coefficient alternative.
// tb_hbf_common drives each build and checks every output against the
// filter equation, the latency of 6 + 2 cycles and the settled DC gain.
// This wrapper adds the results of both, keeps the watchdog and prints the
// verdict.
module tb_hbf1;
  localparam int N_IN = 400;

  logic done [2];
  int   n_checks [2], n_failures [2];

  tb_hbf_common #(.STAGE(1), .N_TAPS(12), .CW(16), .MUL_W(25), .ACC_W(42), .IN_GAP(16), .N_IN(N_IN)) u_full (
    .done(done[0]), .n_checks(n_checks[0]), .n_failures(n_failures[0])
  );
  tb_hbf_common #(.STAGE(1), .N_TAPS(12), .CW(8), .MUL_W(25), .ACC_W(42), .IN_GAP(16), .N_IN(N_IN)) u_short (
    .done(done[1]), .n_checks(n_checks[1]), .n_failures(n_failures[1])
  );

  initial begin : watchdog
    #(10 * (16 * N_IN + 1000));
    $display("TB_RESULT checks=%0d failures=%0d", n_checks[0] + n_checks[1],
             n_failures[0] + n_failures[1] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", n_checks[0] + n_checks[1],
             n_failures[0] + n_failures[1]);
    $finish;
  end
endmodule
