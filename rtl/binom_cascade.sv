// binom_cascade: (1 + z^-1)^K built as K cascaded sections, each adding its
// current input to its previous input (the comb structure of the design that
// needs neither integrators nor multipliers). Section k keeps one register
// with its last input; the word grows by one bit per section. The chain is
// evaluated within one sample: out_valid equals in_valid and out_data is
// the output for the sample on in_data in the same cycle.
module binom_cascade #(
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

  logic signed [OUT_W-1:0] prev [K];  // last input of each section
  logic signed [OUT_W-1:0] sec  [K];  // output of each section

  assign sec[0] = OUT_W'(in_data) + prev[0];
  for (genvar k = 1; k < K; k++) begin : g_sec
    assign sec[k] = sec[k-1] + prev[k];
  end

  assign out_data  = sec[K-1];
  assign out_valid = in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) prev[k] <= '0;
    end else if (in_valid) begin
      prev[0] <= OUT_W'(in_data);
      for (int k = 1; k < K; k++) prev[k] <= sec[k-1];
    end
  end

endmodule
