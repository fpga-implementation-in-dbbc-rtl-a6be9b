// tb_ddc_channel: end-to-end test of one down-converter channel.
//
// The local oscillator is set to 0.2 of the sample rate.  For each
// decimation setting dec_sel = 0..3 the output rate is f_clk / 2^dec_sel,
// and a real tone of amplitude 100 is fed four samples per clock, a quarter
// of that output rate below the LO (lower sideband) or the same distance
// above it (upper sideband).  For each combination of tone and sideband
// selection, the channel is left to settle and 256 output samples (those
// marked by valid_o) are measured:
//   - wanted sideband: rms within 7000..11000 (expected about 8950: two
//     branches of 100*127/2 each, unity filter gains), and about 128 sign
//     changes, i.e. the tone appears at a quarter of the output rate;
//   - unwanted sideband: rms below 1/10 of the wanted one (20 dB);
//   - rate: the 256 samples take 256 * 2^dec_sel clocks (+/-1).
module tb_ddc_channel;
  import dbbc_pkg::*;
  localparam int M = 4;
  localparam real PI = 3.14159265358979;
  localparam real F_LO = 0.2, F_OFF = 0.0625;

  logic clk = 0, rst_n = 0;
  logic signed [7:0] samples_i [M];
  logic [31:0] ftw;
  sideband_e sb;
  logic signed [15:0] y_o;
  logic [1:0] dec_sel;
  logic valid_o;
  real f_tone;
  longint sidx = 0;
  int checks = 0, failures = 0;
  real rms_pass [2];

  ddc_channel dut (.clk, .rst_n, .samples_i, .ftw, .sideband_i(sb), .dec_sel, .valid_o, .y_o);

  always #5 clk = ~clk;

  // Tone source: M new samples per clock.
  always @(negedge clk) begin
    for (int k = 0; k < M; k++) begin
      real v;
      v = 100.0 * $cos(2.0 * PI * f_tone * real'(sidx + k));
      samples_i[k] <= 8'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
    end
    sidx <= sidx + M;
  end

  task automatic measure(output real rms, output int crossings, output int clocks);
    real acc = 0.0;
    logic prev_neg = 0;
    crossings = 0;
    clocks = 0;
    repeat (200 << dec_sel) @(posedge clk);
    // align to an output sample
    do begin @(posedge clk); #1; end while (!valid_o);
    for (int n = 0; n < 256; n++) begin
      if (n > 0) begin
        do begin @(posedge clk); #1; clocks++; end while (!valid_o);
      end
      acc += $itor(y_o) * $itor(y_o);
      if (n > 0 && ((y_o < 0) != prev_neg)) crossings++;
      prev_neg = (y_o < 0);
    end
    rms = $sqrt(acc / 256.0);
  endtask

  initial begin
    real rms_want, rms_other;
    int cr_want, cr_other, clk_want, clk_other;
    real f_off;
    ftw = 32'($rtoi(F_LO * 4294967296.0));
    f_tone = F_LO - F_OFF;
    sb = SB_LSB;
    dec_sel = 0;
    for (int k = 0; k < M; k++) samples_i[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int d = 0; d < 4; d++)
    for (int mode = 0; mode < 2; mode++) begin
      dec_sel = 2'(d);
      f_off = F_OFF / real'(1 << d);
      sb = (mode == 0) ? SB_LSB : SB_USB;
      // wanted tone: below the LO for LSB, above for USB
      f_tone = (mode == 0) ? F_LO - f_off : F_LO + f_off;
      measure(rms_want, cr_want, clk_want);
      f_tone = (mode == 0) ? F_LO + f_off : F_LO - f_off;
      measure(rms_other, cr_other, clk_other);
      $display("dec_sel %0d %s: wanted rms %0.1f (%0d sign changes), unwanted rms %0.1f, %0d clocks per 255 samples",
               d, mode == 0 ? "LSB" : "USB", rms_want, cr_want, rms_other, clk_want);
      checks += 4;
      if (rms_want < 7000.0 || rms_want > 11000.0) failures++;
      if (cr_want < 120 || cr_want > 136) failures++;
      if (rms_other > rms_want / 10.0) failures++;
      if (clk_want != 255 * (1 << d)) failures++;
      rms_pass[mode] = rms_want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
