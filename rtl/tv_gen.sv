// tv_gen: internal input vector generator. Produces a 1-bit stream that can
// replace the modulator outputs for testing without the analog front end.
// It is a first-order digital sigma-delta modulator: the signed 16-bit level
// is offset to an unsigned value u = level + 2^15 and added every enabled
// cycle to a 16-bit phase accumulator; the carry out is the output bit. The
// density of ones is u / 2^16, so the stream's mean (bit 1 = +1, 0 = -1) is
// level / 2^15. The generator is named by the design; what it generates is
// this implementation's choice. bit_out is registered and changes one cycle
// after an enabled clock edge.
module tv_gen (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [15:0] level,
  output logic              bit_out
);

  logic [15:0] acc;
  logic [16:0] sum;

  assign sum = {1'b0, acc} + {1'b0, level ^ 16'h8000};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      bit_out <= 1'b0;
    end else if (en) begin
      acc     <= sum[15:0];
      bit_out <= sum[16];
    end
  end

endmodule
