// tb_zero_baseline: zero-baseline fringe test of the converter on noise.
//
// In a zero-baseline test, two recorders take the same IF signal and their
// outputs are cross-correlated.  The result is a cross spectrum ("fringe")
// whose amplitude shows how coherent the two channels are and whose phase
// across the band shows any phase non-linearity between them.  Here the
// whole converter (dbbc_top at its default size) is fed white noise, uniform
// in -63..63, on the A/P buses, and its four channels are set up as follows
// (frequencies as fractions of the sample rate f_s, dec_sel = 0, so the
// output rate is f_s/4):
//   channel 0: LO 0.2,   LSB -> RF band 0.075..0.2, inverted
//   channel 1: LO 0.2,   LSB -> identical to channel 0
//   channel 2: LO 0.2,   USB -> RF band 0.2..0.325, unrelated noise
//   channel 3: LO 0.075, USB -> RF band 0.075..0.2, same band as channel 0
// Channel 3 holds the same RF band as channel 0, but with the band upright.
// Multiplying it by (-1)^n flips it, so that its output bin u (in units of
// the output rate) again holds RF frequency 0.2 - u*f_s/4.  Checks:
//   * channels 0 and 1 agree sample by sample (two identical channels give
//     a flat fringe with phase exactly zero);
//   * channel 0 against flipped channel 3, two differently tuned channels
//     that each reject the other sideband: coherence above 0.95 over the
//     output bins from 0.08 to 0.42 of the output rate, and a cross phase that
//     departs by less than 2 degrees rms (5 degrees at most) from a straight
//     line across those bins; that line is flat (below 1 degree per bin),
//     as both channels have the same latency;
//   * channel 0 against channel 2, opposite sidebands of one LO: coherence
//     below 0.35 in every checked bin, since they hold unrelated noise;
//   * one output sample per clock.
// Cross spectra are averaged over 64 segments of 64 samples, Hann-windowed.
module tb_zero_baseline;
  import dbbc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NCH = 4;
  localparam int NFFT = 64;
  localparam int NSEG = 64;
  localparam int NS = NFFT * NSEG;
  localparam int K_LO = 5, K_HI = 27;   // checked bins: 0.08..0.42 of the output rate

  logic clk_ddr = 0, clk_proc = 0, rst_n = 0;
  logic signed [7:0] a_bus = '0, p_bus = '0;
  logic [31:0] ftw [NCH];
  sideband_e sb [NCH];
  logic signed [15:0] bb_o [NCH];
  logic [1:0] dec_sel [NCH];
  logic bb_valid_o [NCH];
  int checks = 0, failures = 0;
  bit done = 0;
  real y [NCH][NS];

  dbbc_top dut (.clk_ddr, .clk_proc, .rst_n, .a_bus, .p_bus, .ftw, .sideband_i(sb),
                .dec_sel, .bb_valid_o, .bb_o);

  function automatic logic signed [7:0] noise();
    return 8'(int'($urandom_range(126)) - 63);
  endfunction

  // Sampler: clocks and bus data, as in the end-to-end test.  Period 8;
  // clk_proc rises at 8n, clk_ddr at 8n+2.
  initial begin
    void'($urandom(17));
    while (!done) begin
      clk_proc = 1;
      #1 a_bus = noise(); p_bus = noise();
      #1 clk_ddr = 1;
      #1 a_bus = noise(); p_bus = noise();
      #1 clk_proc = 0;
      #2 clk_ddr = 0;
      #2;
    end
  end

  task automatic cross_spectrum(input logic [1:0] ca, input logic [1:0] cb, input bit flip_b,
                                output real coh [NFFT/2], output real ph [NFFT/2]);
    real sxr [NFFT/2], sxi [NFFT/2], saa [NFFT/2], sbb [NFFT/2];
    for (int k = 0; k < NFFT/2; k++) begin sxr[k] = 0; sxi[k] = 0; saa[k] = 0; sbb[k] = 0; end
    for (int s = 0; s < NSEG; s++) begin
      for (int k = 0; k < NFFT/2; k++) begin
        real ar = 0, ai = 0, br = 0, bi = 0;
        for (int n = 0; n < NFFT; n++) begin
          real w, c, sn, a, b;
          int i;
          i  = s * NFFT + n;
          w  = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NFFT));
          c  = $cos(2.0 * PI * real'(k * n) / real'(NFFT));
          sn = -$sin(2.0 * PI * real'(k * n) / real'(NFFT));
          a  = w * y[ca][i];
          b  = w * y[cb][i] * ((flip_b && (i % 2 == 1)) ? -1.0 : 1.0);
          ar += a * c; ai += a * sn;
          br += b * c; bi += b * sn;
        end
        // A * conj(B)
        sxr[k] += ar * br + ai * bi;
        sxi[k] += ai * br - ar * bi;
        saa[k] += ar * ar + ai * ai;
        sbb[k] += br * br + bi * bi;
      end
    end
    for (int k = 0; k < NFFT/2; k++) begin
      coh[k] = $sqrt(sxr[k] * sxr[k] + sxi[k] * sxi[k]) / $sqrt(saa[k] * sbb[k] + 1.0e-30);
      ph[k]  = $atan2(sxi[k], sxr[k]) * 180.0 / PI;
    end
  endtask

  initial begin
    real coh [NFFT/2], ph [NFFT/2];
    real unw [NFFT/2];
    real sk, sp, skk, skp, slope, icpt, res, res_sq, res_max, rms0, cmax;
    int clocks, nk, n_equal;

    ftw[0] = 32'($rtoi(0.2 * 4294967296.0));     sb[0] = SB_LSB;
    ftw[1] = ftw[0];                              sb[1] = SB_LSB;
    ftw[2] = ftw[0];                              sb[2] = SB_USB;
    ftw[3] = 32'($rtoi(0.075 * 4294967296.0));   sb[3] = SB_USB;
    for (int c = 0; c < NCH; c++) dec_sel[c] = 0;
    repeat (4) @(posedge clk_proc);
    #0.5 rst_n = 1;
    repeat (200) @(posedge clk_proc);

    // record NS output samples of every channel
    clocks = 0;
    n_equal = 0;
    rms0 = 0.0;
    for (int n = 0; n < NS; n++) begin
      do begin @(posedge clk_proc); #0.5; clocks++; end while (!bb_valid_o[0]);
      for (int c = 0; c < NCH; c++) y[c][n] = $itor(bb_o[c]);
      checks++;
      if (bb_o[1] !== bb_o[0] || bb_valid_o[1] !== bb_valid_o[0]) failures++;
      else n_equal++;
      rms0 += y[0][n] * y[0][n];
    end
    rms0 = $sqrt(rms0 / real'(NS));
    $display("%0d samples in %0d clocks; channel 0 rms %0.1f; channels 0 and 1 equal in %0d samples",
             NS, clocks, rms0, n_equal);
    checks += 2;
    if (clocks != NS) failures++;
    if (rms0 < 300.0) failures++;   // the band must actually carry noise

    // channel 0 against channel 3 flipped: same RF band from two LOs
    cross_spectrum(0, 3, 1'b1, coh, ph);
    for (int k = K_LO; k <= K_HI; k++) begin
      unw[k] = ph[k];
      if (k > K_LO) begin
        while (unw[k] - unw[k-1] > 180.0) unw[k] -= 360.0;
        while (unw[k] - unw[k-1] < -180.0) unw[k] += 360.0;
      end
    end
    sk = 0; sp = 0; skk = 0; skp = 0; nk = 0;
    for (int k = K_LO; k <= K_HI; k++) begin
      sk += k; sp += unw[k]; skk += k * k; skp += k * unw[k]; nk++;
    end
    slope = (nk * skp - sk * sp) / (nk * skk - sk * sk);
    icpt  = (sp - slope * sk) / nk;
    res_sq = 0; res_max = 0;
    for (int k = K_LO; k <= K_HI; k++) begin
      res = unw[k] - (icpt + slope * k);
      res_sq += res * res;
      if ((res < 0 ? -res : res) > res_max) res_max = (res < 0 ? -res : res);
      checks++;
      if (coh[k] < 0.95) begin
        failures++;
        $display("bin %0d: coherence %0.3f between channel 0 and channel 3", k, coh[k]);
      end
    end
    $display("fringe channel 0 x channel 3: coherence %0.3f..%0.3f, phase slope %0.2f deg/bin, residual rms %0.3f deg, max %0.3f deg",
             coh[K_LO], coh[(K_LO + K_HI) / 2], slope, $sqrt(res_sq / nk), res_max);
    checks += 3;
    if (slope > 1.0 || slope < -1.0) failures++;   // equal latency: no delay between them
    if ($sqrt(res_sq / nk) > 2.0) failures++;
    if (res_max > 5.0) failures++;

    // channel 0 against channel 2: opposite sidebands, unrelated noise
    cross_spectrum(0, 2, 1'b0, coh, ph);
    cmax = 0;
    for (int k = K_LO; k <= K_HI; k++) begin
      checks++;
      if (coh[k] > 0.35) failures++;
      if (coh[k] > cmax) cmax = coh[k];
    end
    $display("channel 0 x channel 2 (other sideband): largest coherence %0.3f", cmax);

    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
