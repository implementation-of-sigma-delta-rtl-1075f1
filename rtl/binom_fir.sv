// binom_fir: direct-form FIR with the binomial impulse response
// (1 + z^-1)^K, i.e. coefficients C(K,0) .. C(K,K) (K = 5: 1 5 10 10 5 1,
// K = 7: 1 7 21 35 35 21 7 1), as in the FIR comb structure of the design.
// A K-deep delay line holds the previous inputs and each tap has a constant
// multiplier; the normalisation 1/2^K is left as a binary point, so the
// output grows by K bits. The result is combinational: out_valid equals
// in_valid and out_data is the output for the sample on in_data in the same
// cycle. The following down-sampler registers the samples it keeps.
module binom_fir #(
  parameter int unsigned K     = 5,
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = IN_W + K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  logic signed [IN_W-1:0] dly [K];  // dly[i] = x[n-1-i]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) dly[i] <= '0;
    end else if (in_valid) begin
      dly[0] <= in_data;
      for (int i = 1; i < K; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    logic signed [OUT_W-1:0] acc;
    acc = OUT_W'(in_data);  // C(K,0) = 1
    for (int i = 1; i <= K; i++)
      acc += OUT_W'(dly[i-1]) * OUT_W'(binom(K, i));
    out_data  = acc;
    out_valid = in_valid;
  end

endmodule
