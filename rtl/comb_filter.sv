// comb_filter: the complete comb decimator of one channel, decimation 16,
//   H(z) = ((1-z^-4)/(1-z^-1))^4 ((1-z^-8)/(1-z^-4))^5 ((1-z^-16)/(1-z^-8))^7
// taking the 1-bit modulator stream at 128 fs to 22-bit words at 8 fs.
//
// The first factor, H1, runs on the 1-bit stream with the ROM structure of
// comb4_rom and is followed by down-sampling by 4. After it, H2 is
// (1+z^-1)^5 at 32 fs and H3 is (1+z^-1)^7 at 16 fs, each followed by
// down-sampling by 2. The design offers three structures for H2 H3, picked
// here with COMB_ARCH:
//   COMB_INTDIFF (1): integrators and differentiators with wrap-around,
//   COMB_FIR     (2): direct-form binomial FIRs with constant multipliers,
//   COMB_CASCADE (3): cascaded (1+z^-1) sections (the structure the design
//                     rates best for power and performance; the default).
// All three produce the same output words, one every 16 input bits. The DC
// gain is 2^20: an all-ones input gives +2^20, all zeros -2^20.
// Output latency after the 16th input bit: 3 cycles (FIR, cascade) or 4
// cycles (integrator/differentiator).
module comb_filter
  import sdadc_pkg::*;
#(
  parameter comb_arch_e COMB_ARCH = COMB_CASCADE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_bit,
  output logic                     out_valid,
  output logic signed [COMB_W-1:0] out_data
);

  logic                   h1_v, d4_v;
  logic signed [H1_W-1:0] h1_d, d4_d;

  comb4_rom u_h1 (
    .clk, .rst_n, .in_valid, .in_bit,
    .out_valid(h1_v), .out_data(h1_d)
  );

  decim #(.W(H1_W), .M(4)) u_dec4 (
    .clk, .rst_n, .in_valid(h1_v), .in_data(h1_d),
    .out_valid(d4_v), .out_data(d4_d)
  );

  if (COMB_ARCH == COMB_INTDIFF) begin : g_intdiff
    comb_intdiff #(.IN_W(H1_W), .OUT_W(COMB_W)) u_cic (
      .clk, .rst_n, .in_valid(d4_v), .in_data(d4_d),
      .out_valid, .out_data
    );
  end else begin : g_binom
    logic                   h2_v, d2a_v, h3_v;
    logic signed [H2_W-1:0] h2_d, d2a_d;
    logic signed [COMB_W-1:0] h3_d;

    if (COMB_ARCH == COMB_FIR) begin : g_fir
      binom_fir #(.K(5), .IN_W(H1_W), .OUT_W(H2_W)) u_h2 (
        .clk, .rst_n, .in_valid(d4_v), .in_data(d4_d), .out_valid(h2_v), .out_data(h2_d));
      binom_fir #(.K(7), .IN_W(H2_W), .OUT_W(COMB_W)) u_h3 (
        .clk, .rst_n, .in_valid(d2a_v), .in_data(d2a_d), .out_valid(h3_v), .out_data(h3_d));
    end else begin : g_cascade
      binom_cascade #(.K(5), .IN_W(H1_W), .OUT_W(H2_W)) u_h2 (
        .clk, .rst_n, .in_valid(d4_v), .in_data(d4_d), .out_valid(h2_v), .out_data(h2_d));
      binom_cascade #(.K(7), .IN_W(H2_W), .OUT_W(COMB_W)) u_h3 (
        .clk, .rst_n, .in_valid(d2a_v), .in_data(d2a_d), .out_valid(h3_v), .out_data(h3_d));
    end

    decim #(.W(H2_W), .M(2)) u_dec2a (
      .clk, .rst_n, .in_valid(h2_v), .in_data(h2_d), .out_valid(d2a_v), .out_data(d2a_d));
    decim #(.W(COMB_W), .M(2)) u_dec2b (
      .clk, .rst_n, .in_valid(h3_v), .in_data(h3_d), .out_valid, .out_data);
  end

endmodule
