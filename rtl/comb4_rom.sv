// comb4_rom: 4th-order comb H1(z) = (1 + z^-1 + z^-2 + z^-3)^4 on a 1-bit
// sigma-delta stream, computed with look-up tables instead of multipliers.
//
// The 13 most recent modulator bits x[n] .. x[n-12] sit in a shift register
// (bit 1 stands for +1, bit 0 for -1). The 13 filter coefficients
// 1 4 10 20 31 40 44 40 31 20 10 4 1 are symmetric about x[n-6], so one table
// serves both halves: the left ROM is addressed by x[n] .. x[n-5], the right
// ROM by x[n-12] .. x[n-7] in mirrored order, and each returns the signed
// 8-bit partial sum of six +-c_i terms. A small logic term gives +-44 for the
// centre tap. An 8-bit adder forms the 9-bit sum of the two ROM words and a
// second adder adds the centre term, giving the 10-bit output (range +-256,
// DC gain 256; the 1/256 scaling of the filter equation is a binary point).
// The structure, the ROM sizes and the word widths follow the design; the
// ROM contents are computed at elaboration by sdadc_pkg::comb_rom_word.
//
// Interface: in_valid/in_bit deliver one modulator bit per strobe (every
// MCLK cycle in this design). out_valid rises one cycle after in_valid and
// out_data is the filter output for the window that ends with that bit.
// Reset loads the alternating pattern 1010..., whose filter output is 0.
module comb4_rom
  import sdadc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    out_valid,
  output logic signed [H1_W-1:0]  out_data
);

  localparam logic [12:0] RESET_HIST = 13'b1010101010101;

  // hist[k] holds x[n-k]
  logic [12:0] hist;

  // 64 x 8 coefficient ROM, shared by the left and the right half.
  logic [63:0][7:0] rom;
  for (genvar a = 0; a < 64; a++) begin : g_rom
    assign rom[a] = comb_rom_word(a);
  end

  logic [5:0]        addr_l, addr_r;
  logic signed [7:0] word_l, word_r;
  logic signed [8:0] sum_lr, centre;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist      <= RESET_HIST;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) hist <= {hist[11:0], in_bit};
    end
  end

  always_comb begin
    addr_l   = {hist[0], hist[1], hist[2], hist[3], hist[4], hist[5]};
    addr_r   = {hist[12], hist[11], hist[10], hist[9], hist[8], hist[7]};
    word_l   = rom[addr_l];
    word_r   = rom[addr_r];
    sum_lr   = 9'(word_l) + 9'(word_r);
    centre   = hist[6] ? 9'sd44 : -9'sd44;
    out_data = H1_W'(sum_lr) + H1_W'(centre);
  end

endmodule
