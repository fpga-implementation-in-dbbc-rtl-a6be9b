// tb_phase_linearity: phase characteristic of one converter channel, in the
// manner of a phase-calibration tone measurement, at full output rate
// (dec_sel = 0, a new output sample every clock).
//
// For each sideband, 21 tones are swept across the channel pass band, at
// output frequencies d = 0.10, 0.11, ... 0.30 of the output sample rate (input tone
// at LO -/+ d*f_clk, LO = 0.2 f_s).  Before each tone the channel is reset,
// so the local oscillator and the tone start from the same phase every time.
// After the filters settle, 400 output samples (a whole number of tone
// periods) are correlated with cos and sin at d, the time origin being the
// first input sample after reset; this gives the output phase.
// The unwrapped phases are fitted with a straight line: the largest
// deviation from it must stay below 1 degree (linear phase, constant group
// delay), the slope must correspond to a group delay of 35..45 output
// samples, and every tone must reach an amplitude of 10000..13500.
module tb_phase_linearity;
  import dbbc_pkg::*;
  localparam int M = 4;
  localparam int NT = 21;
  localparam int NS = 400;
  localparam real PI = 3.14159265358979;
  localparam real F_LO = 0.2;

  logic clk = 0, rst_n = 0;
  logic signed [7:0] samples_i [M];
  logic [31:0] ftw;
  sideband_e sb;
  logic signed [15:0] y_o;
  logic [1:0] dec_sel = 0;
  logic valid_o;
  real f_tone;
  longint sidx = 0;
  int checks = 0, failures = 0;

  ddc_channel dut (.clk, .rst_n, .samples_i, .ftw, .sideband_i(sb), .dec_sel, .valid_o, .y_o);

  always #5 clk = ~clk;

  // Tone source; the sample index restarts with the channel's reset.
  always @(negedge clk) begin
    for (int k = 0; k < M; k++) begin
      real v;
      v = 100.0 * $cos(2.0 * PI * f_tone * real'(sidx + longint'(k)));
      samples_i[k] <= 8'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
    end
    sidx <= rst_n ? sidx + longint'(M) : 0;
  end

  initial begin
    real d [NT], ph [NT], amp;
    real ci, si, step, sx, sy, sxx, sxy, slope, icpt, dev, worst, delay;
    ftw = 32'($rtoi(F_LO * 4294967296.0));
    f_tone = F_LO;
    for (int k = 0; k < M; k++) samples_i[k] = '0;
    for (int s = 0; s < 2; s++) begin
      sb = (s == 0) ? SB_LSB : SB_USB;
      for (int t = 0; t < NT; t++) begin
        d[t] = 0.10 + 0.01 * real'(t);
        f_tone = (s == 0) ? F_LO - d[t] / M : F_LO + d[t] / M;
        rst_n = 0;
        repeat (3) @(posedge clk);
        #1 rst_n = 1;
        repeat (150) @(posedge clk);
        // output sample m = n + 150 clocks after the tone starts
        ci = 0.0; si = 0.0;
        for (int n = 0; n < NS; n++) begin
          @(posedge clk);
          #1;
          ci += $itor(y_o) * $cos(2.0 * PI * d[t] * real'(n + 150));
          si += $itor(y_o) * $sin(2.0 * PI * d[t] * real'(n + 150));
        end
        ph[t] = $atan2(-si, ci);
        amp = 2.0 * $sqrt(ci * ci + si * si) / NS;
        checks++;
        if (amp < 10000.0 || amp > 13500.0) begin
          failures++;
          $display("%s tone %0.2f: amplitude %0.1f", s == 0 ? "LSB" : "USB", d[t], amp);
        end
        // unwrap against the previous tone
        if (t > 0) begin
          step = ph[t] - ph[t-1];
          while (step > PI)   begin ph[t] -= 2.0 * PI; step -= 2.0 * PI; end
          while (step <= -PI) begin ph[t] += 2.0 * PI; step += 2.0 * PI; end
        end
      end
      // least-squares line through (d, phase)
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int t = 0; t < NT; t++) begin
        sx += d[t]; sy += ph[t]; sxx += d[t] * d[t]; sxy += d[t] * ph[t];
      end
      slope = (NT * sxy - sx * sy) / (NT * sxx - sx * sx);
      icpt  = (sy - slope * sx) / NT;
      worst = 0.0;
      for (int t = 0; t < NT; t++) begin
        dev = (ph[t] - (icpt + slope * d[t])) * 180.0 / PI;
        if (dev < 0) dev = -dev;
        if (dev > worst) worst = dev;
      end
      delay = (slope < 0 ? -slope : slope) / (2.0 * PI);
      $display("%s: group delay %0.2f output samples, largest phase deviation from a line %0.3f deg",
               s == 0 ? "LSB" : "USB", delay, worst);
      checks += 2;
      if (worst > 1.0) failures++;
      if (delay < 35.0 || delay > 45.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
