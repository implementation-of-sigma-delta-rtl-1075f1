// comb_intdiff: the H2(z) H3(z) part of the comb decimator built from
// integrators and differentiators (first comb structure of the design).
//
// Input: the 4th-order comb output after down-sampling by 4 (32 fs).
//   - 5 integrators y[n] = x[n] + y[n-1] at 32 fs, then down-sampling by 2,
//   - 2 integrators at 16 fs, then down-sampling by 2,
//   - 7 differentiators y[n] = x[n] - x[n-1] at 8 fs.
// Together these equal (1+z^-1)^5 at 32 fs followed by (1+z^-1)^7 at 16 fs,
// i.e. H2 and H3 of the comb equation. The integrators overflow by design:
// all stages use ACC_W-bit two's complement arithmetic that wraps around, and
// since the true output fits in OUT_W <= ACC_W bits the differentiators
// recover it exactly. ACC_W = 32 is the design's word length for these
// stages; this implementation uses it for the first five integrators too
// (a narrower first group, such as the 15-bit minimum computed for a
// stand-alone 5-stage filter, would not cancel exactly with the later
// differentiators).
//
// Each group of stages is a chain of adders evaluated within one sample
// (no pipeline registers between stages) so that the decimation phase is
// the same as in the other two comb structures. Timing: out_valid/out_data
// appear three cycles after the in_valid of every fourth input sample.
module comb_intdiff
  import sdadc_pkg::*;
#(
  parameter int unsigned IN_W   = H1_W,
  parameter int unsigned OUT_W  = COMB_W,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned N_INT1 = 5,
  parameter int unsigned N_INT2 = 2,
  parameter int unsigned N_DIFF = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  typedef logic signed [ACC_W-1:0] acc_t;

  // ---- 5 integrators at 32 fs ------------------------------------------
  acc_t int1_r [N_INT1];
  acc_t int1_y [N_INT1];

  assign int1_y[0] = int1_r[0] + acc_t'(in_data);
  for (genvar k = 1; k < N_INT1; k++) begin : g_int1
    assign int1_y[k] = int1_r[k] + int1_y[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_INT1; k++) int1_r[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < N_INT1; k++) int1_r[k] <= int1_y[k];
    end
  end

  logic v16;
  acc_t d16;
  decim #(.W(ACC_W), .M(2)) u_dec_a (
    .clk, .rst_n, .in_valid(in_valid), .in_data(int1_y[N_INT1-1]),
    .out_valid(v16), .out_data(d16)
  );

  // ---- 2 integrators at 16 fs ------------------------------------------
  acc_t int2_r [N_INT2];
  acc_t int2_y [N_INT2];

  assign int2_y[0] = int2_r[0] + d16;
  for (genvar k = 1; k < N_INT2; k++) begin : g_int2
    assign int2_y[k] = int2_r[k] + int2_y[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_INT2; k++) int2_r[k] <= '0;
    end else if (v16) begin
      for (int k = 0; k < N_INT2; k++) int2_r[k] <= int2_y[k];
    end
  end

  logic v8;
  acc_t d8;
  decim #(.W(ACC_W), .M(2)) u_dec_b (
    .clk, .rst_n, .in_valid(v16), .in_data(int2_y[N_INT2-1]),
    .out_valid(v8), .out_data(d8)
  );

  // ---- 7 differentiators at 8 fs -----------------------------------------
  acc_t diff_r [N_DIFF];  // previous input of each differentiator
  acc_t diff_y [N_DIFF];

  assign diff_y[0] = d8 - diff_r[0];
  for (genvar k = 1; k < N_DIFF; k++) begin : g_diff
    assign diff_y[k] = diff_y[k-1] - diff_r[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_DIFF; k++) diff_r[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v8;
      if (v8) begin
        diff_r[0] <= d8;
        for (int k = 1; k < N_DIFF; k++) diff_r[k] <= diff_y[k-1];
        out_data <= OUT_W'(diff_y[N_DIFF-1]);
      end
    end
  end

endmodule
