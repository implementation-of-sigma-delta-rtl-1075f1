// hbf_decim: half-band low-pass FIR filter with down-sampling by 2, computed
// by one multiplier-accumulator that visits the coefficients one per clock.
//
// The "front" holds the last N_TAPS input samples in a shift register
// (x[n] .. x[n-N_TAPS+1]) and a ROM with the first half of the symmetric
// impulse response (sdadc_pkg::hbf_coef, table STAGE, rounded to CW bits
// by sdadc_pkg::hbf_coef_q when CW is narrower than the table). Because
// the filter decimates by 2, only every second input sample (numbers 1, 3,
// 5, ... counted from reset) starts a computation. For each coefficient index i
// the front forms the pre-added pair x[n-i] + x[n-N_TAPS+1+i], and mac
// multiplies it by c_i and accumulates, so an output takes ceil(N_TAPS/2)
// clock cycles. The sum, which carries CW-1 fraction bits from the
// coefficients, is rounded (add half, shift right by OUT_SHIFT) and
// saturated to OUT_W bits.
//
// Interface and timing: in_valid/in_data deliver input samples;
// out_valid/out_data carry one output sample ceil(N_TAPS/2) + 2 cycles after
// the in_valid of every second input. Inputs must not arrive while the
// filter is computing (busy high); at the design's rates (an input every
// 16, 32 and 64 clocks for 12, 22 and 116 taps) this always holds, and an
// assertion checks it.
//
// The tap counts, the 16/24-bit coefficient widths and the 32 x 24
// multiplier with 48-bit accumulator of the third filter are the design's,
// and so is the option of 8-bit coefficients (CW = 8) for comparison;
// the serial schedule, the shift-register front and the rounding are this
// implementation's choices.
module hbf_decim
  import sdadc_pkg::*;
#(
  parameter int unsigned STAGE     = 3,
  parameter int unsigned N_TAPS    = 116,
  parameter int unsigned IN_W      = SMP_W,
  parameter int unsigned OUT_W     = SMP_W,
  parameter int unsigned CW        = 24,
  parameter int unsigned MUL_W     = 32,
  parameter int unsigned ACC_W     = 48,
  parameter int unsigned OUT_SHIFT = CW - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    busy
);

  localparam int unsigned NP   = (N_TAPS + 1) / 2;  // coefficient pairs
  localparam int unsigned IDXW = (NP > 1) ? $clog2(NP) : 1;

  // ---- front: delay line, coefficient ROM, pre-adder ----------------------
  logic signed [IN_W-1:0] x [N_TAPS];
  logic signed [CW-1:0]   coef [NP];

  for (genvar i = 0; i < NP; i++) begin : g_coef
    assign coef[i] = CW'(hbf_coef_q(STAGE, i, CW));
  end

  logic            phase, fin;
  logic [IDXW-1:0] idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) x[i] <= '0;
      phase <= 1'b0;
      busy  <= 1'b0;
      fin   <= 1'b0;
      idx   <= '0;
    end else begin
      fin <= 1'b0;
      if (in_valid) begin
        x[0] <= in_data;
        for (int i = 1; i < N_TAPS; i++) x[i] <= x[i-1];
        phase <= ~phase;
        if (phase) begin
          busy <= 1'b1;
          idx  <= '0;
        end
      end
      if (busy) begin
        if (idx == IDXW'(NP - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  logic signed [MUL_W-1:0] pair;
  logic signed [CW-1:0]    c_sel;

  always_comb begin
    pair  = MUL_W'(x[int'(idx)]);
    if (int'(idx) != N_TAPS - 1 - int'(idx))
      pair += MUL_W'(x[N_TAPS - 1 - int'(idx)]);
    c_sel = coef[idx];
  end

  // ---- multiplier and accumulator -------------------------------------
  logic signed [ACC_W-1:0] acc;

  mac #(.DW(MUL_W), .CW(CW), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .en(busy), .clr(idx == '0), .a(pair), .b(c_sel), .acc
  );

  // ---- rounding, saturation, output register --------------------------
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  logic signed [ACC_W-1:0] rounded;

  always_comb rounded = (acc + ACC_W'(64'sd1 <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= fin;
      if (fin) begin
        if (rounded > OMAX)      out_data <= OUT_W'(OMAX);
        else if (rounded < OMIN) out_data <= OUT_W'(OMIN);
        else                     out_data <= OUT_W'(rounded);
      end
    end
  end

  ap_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_valid)
    else $error("hbf_decim: input sample arrived while the filter was busy");

endmodule
