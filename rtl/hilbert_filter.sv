// hilbert_filter: 90-degree phase shifter of the lower (cosine) branch.
//
// An antisymmetric FIR of odd length TAPS (type III) approximates the
// Hilbert transformer: with centre c = (TAPS-1)/2 the taps are
// h[c+k] = -h[c-k] = 2/(pi*k) * w(c+k) for odd k and zero for even k, w
// being a Hamming window; a cosine in gives a sine out, delayed by c
// samples.  The antisymmetry is used: each non-zero tap pair costs one
// subtraction and one multiplication,
//     y[n] = sum_{k odd} h[c+k] * (x[n-c-k] - x[n-c+k]).
// The sum is rounded by COEF_FRAC bits and saturated to W.
//
// Timing: a sample is taken on every clock with en_i high (the sample
// strobe after decimation); the output register also only moves then, so
// the latency is c + 1 strobes (matched by delay_line in the other branch).
// With en_i held high this is c + 1 clocks.
//
// The 90-degree branch is part of the design; implementing it as a
// windowed FIR, its length and number formats are this design's choices.
module hilbert_filter #(
  parameter int unsigned W         = dbbc_pkg::DW,
  parameter int unsigned COEF_W    = dbbc_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = dbbc_pkg::COEF_FRAC,
  parameter int unsigned TAPS      = 31,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{
    -16'sd111,  16'sd0, -16'sd192,  16'sd0, -16'sd440,  16'sd0, -16'sd922,  16'sd0,
    -16'sd1753, 16'sd0, -16'sd3213, 16'sd0, -16'sd6343, 16'sd0, -16'sd20651, 16'sd0,
    16'sd20651, 16'sd0, 16'sd6343,  16'sd0, 16'sd3213,  16'sd0, 16'sd1753,  16'sd0,
    16'sd922,   16'sd0, 16'sd440,   16'sd0, 16'sd192,   16'sd0, 16'sd111
  }
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  logic signed [W-1:0] x_i,
  output logic signed [W-1:0] y_o
);

  if (TAPS % 2 == 0) begin : g_bad_taps
    $error("hilbert_filter: TAPS must be odd");
  end

  localparam int unsigned C = (TAPS - 1) / 2;

  // hist[i] = x[n-1-i]
  logic signed [W-1:0] hist [TAPS-1];
  logic signed [W-1:0] win  [TAPS];
  logic signed [63:0]  acc;

  always_comb begin
    win[0] = x_i;
    for (int i = 1; i < TAPS; i++) win[i] = hist[i-1];
  end

  always_comb begin
    acc = '0;
    for (int k = 1; k <= C; k += 2)
      acc += 64'(COEFS[C+k]) * (64'(win[C+k]) - 64'(win[C-k]));
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
