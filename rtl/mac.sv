// mac: the multiplier-accumulator used serially by the half-band filters:
// a DW x CW signed multiplier (32 x 24 at the default, as drawn for the
// third half-band filter) feeding an ACC_W-bit accumulator (48 bits).
// With en high, each clock adds a*b to the accumulator, or loads a*b when
// clr is also high (first product of a new output sample). The product is
// truncated to ACC_W bits before the addition; the filters keep their
// operands small enough that no bits are lost. acc is registered: it holds
// the sum one cycle after the last enabled product.
module mac #(
  parameter int unsigned DW    = 32,
  parameter int unsigned CW    = 24,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [DW-1:0]    a,
  input  logic signed [CW-1:0]    b,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [DW+CW-1:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? '0 : acc) + ACC_W'(prod);
  end

endmodule
