// polyphase_decimator: multi-rate low-pass filter that takes M parallel
// samples per clock and delivers one filtered sample per clock, i.e. a
// low-pass FIR followed by decimation by M, built as M poly-phase
// sub-filters.
//
// Sub-filter p holds the taps h[p], h[p+M], h[p+2M], ... and runs on the
// stream of lane M-1-p, so every sub-filter works at the clock rate; their
// sum is the decimated output
//     y[n] = sum_j h[j] * s[M*n + M-1 - j],
// where s is the input sample stream and lane M-1 holds the newest sample.
// The sum is rounded, shifted right by COEF_FRAC and saturated to OUT_W.
//
// Timing: y_o is registered; the output at clock n+1 belongs to the lanes
// presented at clock n.  No handshake: a sample is accepted every clock.
//
// The poly-phase structure follows the design; the number of taps, the
// cut-off (0.1 of the input sample rate, Hamming-windowed sinc, unity DC
// gain) and the number formats are this design's choices.
module polyphase_decimator #(
  parameter int unsigned M         = dbbc_pkg::M,
  parameter int unsigned IN_W      = dbbc_pkg::DW,
  parameter int unsigned OUT_W     = dbbc_pkg::DW,
  parameter int unsigned COEF_W    = dbbc_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = dbbc_pkg::COEF_FRAC,
  parameter int unsigned TAPS      = 32,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{
    -16'sd17,  16'sd20,   16'sd73,   16'sd135,  16'sd164,  16'sd91,   -16'sd129, -16'sd466,
    -16'sd783, -16'sd850, -16'sd435, 16'sd588,  16'sd2141, 16'sd3927, 16'sd5501, 16'sd6424,
    16'sd6424, 16'sd5501, 16'sd3927, 16'sd2141, 16'sd588,  -16'sd435, -16'sd850, -16'sd783,
    -16'sd466, -16'sd129, 16'sd91,   16'sd164,  16'sd135,  16'sd73,   16'sd20,   -16'sd17
  }
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x_i [M],
  output logic signed [OUT_W-1:0] y_o
);

  if (TAPS <= M) begin : g_bad_taps
    $error("polyphase_decimator: TAPS must exceed M");
  end

  localparam int unsigned PHASE_TAPS = (TAPS + M - 1) / M;
  localparam int unsigned HIST       = TAPS - M;

  // hist[i] is the sample i+1 steps older than lane 0.
  logic signed [IN_W-1:0] hist [HIST];

  // window[j] = s[t - j], t being the newest sample (lane M-1).
  function automatic logic signed [IN_W-1:0] window(input int unsigned j,
                                                     input logic signed [IN_W-1:0] lanes [M],
                                                     input logic signed [IN_W-1:0] h [HIST]);
    if (j < M) return lanes[M-1-j];
    return h[j-M];
  endfunction

  logic signed [63:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned p = 0; p < M; p++) begin
      for (int unsigned m = 0; m < PHASE_TAPS; m++) begin
        if (p + M*m < TAPS)
          acc += 64'(COEFS[p + M*m]) * 64'(window(p + M*m, x_i, hist));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
      y_o <= '0;
    end else begin
      for (int i = 0; i < HIST; i++) hist[i] <= window(i, x_i, hist);
      y_o <= OUT_W'(dbbc_pkg::sat_dw((acc + (64'sd1 <<< (COEF_FRAC-1))) >>> COEF_FRAC));
    end
  end

endmodule
