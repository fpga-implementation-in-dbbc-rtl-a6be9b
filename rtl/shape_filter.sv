// shape_filter: final FIR that sets the band-pass shape of the base-band
// channel.
//
// A symmetric FIR of odd length TAPS (linear phase, group delay (TAPS-1)/2
// samples) with pre-adders: each tap pair costs one addition and one
// multiplication,
//     y[n] = h[c]*x[n-c] + sum_{k<c} h[k] * (x[n-k] + x[n-TAPS+1+k]).
// The default taps are a Hamming-windowed band-pass from 0.05 to 0.45 of the
// clock rate, which also removes the band edges near zero frequency and near
// Nyquist where the 90-degree branch is least accurate.  The sum is rounded
// by COEF_FRAC bits and saturated.
//
// Timing: a sample is taken on every clock with en_i high; the registered
// output moves on the same strobes (latency 1 strobe plus the group delay).
//
// The shape filter is part of the design; its structure, length, pass band
// and number formats are this design's choices.
module shape_filter #(
  parameter int unsigned W         = dbbc_pkg::DW,
  parameter int unsigned COEF_W    = dbbc_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = dbbc_pkg::COEF_FRAC,
  parameter int unsigned TAPS      = 31,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{
    16'sd0,  16'sd128,   16'sd0, 16'sd172,   16'sd0, 16'sd0,     16'sd0, -16'sd754,
    16'sd0, -16'sd2256,  16'sd0, -16'sd4205, 16'sd0, -16'sd5887, 16'sd0, 16'sd26214,
    16'sd0, -16'sd5887,  16'sd0, -16'sd4205, 16'sd0, -16'sd2256, 16'sd0, -16'sd754,
    16'sd0,  16'sd0,     16'sd0, 16'sd172,   16'sd0, 16'sd128,   16'sd0
  }
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  logic signed [W-1:0] x_i,
  output logic signed [W-1:0] y_o
);

  if (TAPS % 2 == 0) begin : g_bad_taps
    $error("shape_filter: TAPS must be odd");
  end

  localparam int unsigned C = (TAPS - 1) / 2;

  logic signed [W-1:0] hist [TAPS-1];
  logic signed [W-1:0] win  [TAPS];
  logic signed [63:0]  acc;

  always_comb begin
    win[0] = x_i;
    for (int i = 1; i < TAPS; i++) win[i] = hist[i-1];
  end

  always_comb begin
    acc = 64'(COEFS[C]) * 64'(win[C]);
    for (int k = 0; k < C; k++)
      acc += 64'(COEFS[k]) * (64'(win[k]) + 64'(win[TAPS-1-k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS-1; i++) hist[i] <= '0;
      y_o <= '0;
    end else if (en_i) begin
      for (int i = 0; i < TAPS-1; i++) hist[i] <= win[i];
      y_o <= W'(dbbc_pkg::sat_dw((acc + (64'sd1 <<< (COEF_FRAC-1))) >>> COEF_FRAC));
    end
  end

endmodule
