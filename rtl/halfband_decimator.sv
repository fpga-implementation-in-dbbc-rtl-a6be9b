// halfband_decimator: one decimate-by-2 stage of the multi-rate filter
// cascade.
//
// A symmetric half-band FIR (19 taps, Hamming-windowed, cut-off at a quarter
// of its input rate, unity DC gain, Q1.15): every second tap is zero except
// the centre, and each remaining tap pair shares a pre-adder.  A sample is
// taken on every clock with valid_i high; every second such sample an output
// is computed, so valid_o pulses at half the input sample rate.
//
// Timing: y_o and valid_o are registered; the output appears on the clock
// after the accepting valid_i, and y_o holds between strobes.  The first
// output after reset is produced by the second accepted sample.
//
// The cascade of multi-rate filters belongs to the design; half-band stages,
// their length and format are this design's choices.
module halfband_decimator #(
  parameter int unsigned W         = dbbc_pkg::DW,
  parameter int unsigned COEF_W    = dbbc_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = dbbc_pkg::COEF_FRAC,
  parameter int unsigned TAPS      = 19,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{
    16'sd92, 16'sd0, -16'sd279, 16'sd0, 16'sd957, 16'sd0, -16'sd2670, 16'sd0, 16'sd10113,
    16'sd16342,
    16'sd10113, 16'sd0, -16'sd2670, 16'sd0, 16'sd957, 16'sd0, -16'sd279, 16'sd0, 16'sd92
  }
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic signed [W-1:0] x_i,
  output logic                valid_o,
  output logic signed [W-1:0] y_o
);

  if (TAPS % 2 == 0) begin : g_bad_taps
    $error("halfband_decimator: TAPS must be odd");
  end

  localparam int unsigned C = (TAPS - 1) / 2;

  logic signed [W-1:0] hist [TAPS-1];
  logic signed [W-1:0] win  [TAPS];
  logic signed [63:0]  acc;
  logic                odd;   // high when the next accepted sample completes a pair

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
      odd     <= 1'b0;
      valid_o <= 1'b0;
      y_o     <= '0;
    end else begin
      valid_o <= valid_i && odd;
      if (valid_i) begin
        for (int i = 0; i < TAPS-1; i++) hist[i] <= win[i];
        odd <= !odd;
        if (odd)
          y_o <= W'(dbbc_pkg::sat_dw((acc + (64'sd1 <<< (COEF_FRAC-1))) >>> COEF_FRAC));
      end
    end
  end

endmodule
