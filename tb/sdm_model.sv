// sdm_model: behavioural stand-in for the external analog sigma-delta
// modulator, for simulation only (not synthesizable: real arithmetic and
// $sin). It is a second-order single-bit loop (two delay-free integrators
// with unit feedback, stable for inputs up to about 0.7 of full scale)
// driven by AMP * sin(2 pi FREQ t) + DC; the real modulator is third order
// and analog. On every falling clock edge with en high it produces the next
// bit (1 = +1, 0 = -1), so the bit is stable at the next rising edge.
module sdm_model #(
  parameter real AMP  = 0.5,
  parameter real FREQ = 1000.0,
  parameter real DC   = 0.0,
  parameter real FCLK = 6.144e6
) (
  input  logic clk,
  input  logic en,
  output logic bit_out
);

  real    i1 = 0.0, i2 = 0.0, fb = 0.0;
  longint n  = 0;

  initial bit_out = 1'b0;

  always @(negedge clk) begin
    if (en) begin
      real x;
      x  = DC + AMP * $sin(2.0 * 3.14159265358979 * FREQ * real'(n) / FCLK);
      i1 = i1 + x - fb;
      i2 = i2 + i1 - fb;
      bit_out <= (i2 >= 0.0);
      fb = (i2 >= 0.0) ? 1.0 : -1.0;
      n++;
    end
  end

endmodule
