// decim: down-sampler by M. Of the samples presented with in_valid it keeps
// every M-th one, counting from reset: the kept samples are numbers M-1,
// 2M-1, 3M-1, ... (numbering from 0). The kept sample is registered, so
// out_valid and out_data appear one cycle after the accepting in_valid.
// All decimators of the chain count from the same reset, which fixes the
// decimation phase and makes the three comb structures produce identical
// output words. The down-sampling boxes are the design's; the choice of
// phase is this implementation's.
module decim #(
  parameter int unsigned W = 16,
  parameter int unsigned M = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase == CW'(M - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
