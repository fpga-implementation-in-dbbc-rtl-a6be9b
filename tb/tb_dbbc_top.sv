// tb_dbbc_top: end-to-end test of the whole converter, at its default size.
//
// A real tone of amplitude 100 at 0.1375 of the sample rate is driven onto
// the sampler's A and P buses, two samples per clock edge.  The processing
// clock rises 3/4 of a sampler-clock period after the sampler clock.  The
// channels are set up in groups of four (channel c uses entry c mod 4):
//   entry 0: LO 0.2   f_s, LSB  -> tone 0.0625 f_s below LO: passes
//   entry 1: LO 0.2   f_s, USB  -> rejected
//   entry 2: LO 0.075 f_s, USB  -> tone 0.0625 f_s above LO: passes
//   entry 3: LO 0.075 f_s, LSB  -> rejected
// After measuring, every channel's sideband is switched at run time, which
// must swap passing and rejecting channels.  Then all channels switch to
// decimation by 4 more (dec_sel = 2) and are retuned to LO = tone +/-
// 0.015625 f_s, a quarter of the new output rate, with the first sideband
// arrangement.  Wanted outputs need an rms of 7000..11000 and about 128 sign
// changes in 256 output samples (the tone at a quarter of the output rate);
// unwanted outputs need an rms below 1/10 of that; the 256 samples must take
// 256 * 2^dec_sel clocks.  The DDR capture is also checked lane by lane
// against the bus data.  Counted mechanisms, each of which must occur:
// samples captured on rising and on falling edges, LSB passes, USB passes,
// rejections, sideband switches, decimation switches, and passes at two
// different LO frequencies at the same time.
module tb_dbbc_top;
  import dbbc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real F_TONE = 0.1375;
  localparam int NCH = 4;   // the top's default channel count
  localparam int PERIODS = 4000;

  logic clk_ddr = 0, clk_proc = 0, rst_n = 0;
  logic signed [7:0] a_bus = '0, p_bus = '0;
  logic [31:0] ftw [NCH];
  sideband_e sb [NCH];
  logic signed [15:0] bb_o [NCH];
  logic [1:0] dec_sel [NCH];
  logic bb_valid_o [NCH];
  real lo [NCH];
  int n_dec_switch = 0;
  logic signed [7:0] stream [4*PERIODS];
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_lsb_pass = 0, n_usb_pass = 0, n_reject = 0;
  int n_switch = 0, n_multi_lo = 0;
  bit done = 0;
  int period = 0;

  dbbc_top dut (.clk_ddr, .clk_proc, .rst_n, .a_bus, .p_bus, .ftw, .sideband_i(sb),
                .dec_sel, .bb_valid_o, .bb_o);

  // Sampler: clocks and bus data.  Period 8; clk_ddr rises at 8n+2, clk_proc at 8n.
  initial begin
    for (int i = 0; i < 4*PERIODS; i++) begin
      real v;
      v = 100.0 * $cos(2.0 * PI * F_TONE * real'(i));
      stream[i] = 8'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
    end
    for (int n = 0; n < PERIODS && !done; n++) begin
      period = n;
      clk_proc = 1;
      #1 a_bus = stream[4*n]; p_bus = stream[4*n+1];
      if (n > 1) begin
        // DDR capture of the previous sampler period, lane by lane
        checks++;
        if (dut.samples[0] !== stream[4*(n-1)] || dut.samples[1] !== stream[4*(n-1)+1] ||
            dut.samples[2] !== stream[4*(n-1)+2] || dut.samples[3] !== stream[4*(n-1)+3])
          failures++;
        else begin
          n_rise += 2;
          n_fall += 2;
        end
      end
      #1 clk_ddr = 1;
      #1 a_bus = stream[4*n+2]; p_bus = stream[4*n+3];
      #1 clk_proc = 0;
      #2 clk_ddr = 0;
      #2;
    end
  end

  function automatic bit wanted(input int c, input sideband_e s);
    // entries 0 and 1 have their LO above the tone (LSB wanted), 2 and 3 below (USB)
    return (c % 4 < 2) ? (s == SB_LSB) : (s == SB_USB);
  endfunction

  task automatic measure_all();
    real acc [NCH];
    int xings [NCH];
    logic prev_neg [NCH];
    real rms [NCH];
    real ref_rms;
    int n_pass_lo [2];
    int clocks;
    repeat (200 << dec_sel[0]) @(posedge clk_proc);
    for (int c = 0; c < NCH; c++) begin acc[c] = 0.0; xings[c] = 0; prev_neg[c] = 0; end
    do begin @(posedge clk_proc); #0.5; end while (!bb_valid_o[0]);
    clocks = 0;
    for (int n = 0; n < 256; n++) begin
      if (n > 0) begin
        do begin @(posedge clk_proc); #0.5; clocks++; end while (!bb_valid_o[0]);
      end
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (bb_valid_o[c] !== bb_valid_o[0]) failures++;
        acc[c] += $itor(bb_o[c]) * $itor(bb_o[c]);
        if (n > 0 && ((bb_o[c] < 0) != prev_neg[c])) xings[c]++;
        prev_neg[c] = (bb_o[c] < 0);
      end
    end
    checks++;
    if (clocks != 255 * (1 << dec_sel[0])) begin
      failures++;
      $display("rate: 255 samples took %0d clocks", clocks);
    end
    ref_rms = 1.0;
    n_pass_lo = '{0, 0};
    for (int c = 0; c < NCH; c++) begin
      rms[c] = $sqrt(acc[c] / 256.0);
      if (wanted(c, sb[c]) && rms[c] > ref_rms) ref_rms = rms[c];
    end
    for (int c = 0; c < NCH; c++) begin
      $display("channel %0d LO %0.5f dec_sel %0d %s: rms %0.1f, %0d sign changes", c, lo[c], dec_sel[c],
               sb[c] == SB_LSB ? "LSB" : "USB", rms[c], xings[c]);
      checks++;
      if (wanted(c, sb[c])) begin
        if (rms[c] < 7000.0 || rms[c] > 11000.0 || xings[c] < 120 || xings[c] > 136) failures++;
        else begin
          if (sb[c] == SB_LSB) n_lsb_pass++; else n_usb_pass++;
          n_pass_lo[(c % 4) / 2]++;
        end
      end else begin
        if (rms[c] > ref_rms / 10.0) failures++;
        else n_reject++;
      end
    end
    if (n_pass_lo[0] > 0 && n_pass_lo[1] > 0) n_multi_lo++;
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin
      lo[c]  = (c % 4 < 2) ? F_TONE + 0.0625 : F_TONE - 0.0625;
      ftw[c] = 32'($rtoi(lo[c] * 4294967296.0));
      sb[c]  = (c % 4 == 0 || c % 4 == 3) ? SB_LSB : SB_USB;
      dec_sel[c] = 0;
    end
    repeat (4) @(posedge clk_proc);
    #0.5 rst_n = 1;
    measure_all();
    // run-time sideband switch of every channel
    for (int c = 0; c < NCH; c++) begin
      sb[c] = (sb[c] == SB_LSB) ? SB_USB : SB_LSB;
      n_switch++;
    end
    measure_all();
    // run-time switch to decimation by 4 more, retuned, first arrangement
    for (int c = 0; c < NCH; c++) begin
      dec_sel[c] = 2;
      lo[c]  = (c % 4 < 2) ? F_TONE + 0.015625 : F_TONE - 0.015625;
      ftw[c] = 32'($rtoi(lo[c] * 4294967296.0));
      sb[c]  = (c % 4 == 0 || c % 4 == 3) ? SB_LSB : SB_USB;
      n_dec_switch++;
    end
    measure_all();
    $display("captures rising %0d falling %0d; LSB passes %0d, USB passes %0d, rejections %0d, switches %0d, decimation switches %0d, two-LO passes %0d",
             n_rise, n_fall, n_lsb_pass, n_usb_pass, n_reject, n_switch, n_dec_switch, n_multi_lo);
    checks += 8;
    if (n_dec_switch == 0) failures++;
    if (n_rise == 0) failures++;
    if (n_fall == 0) failures++;
    if (n_lsb_pass == 0) failures++;
    if (n_usb_pass == 0) failures++;
    if (n_reject == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_multi_lo == 0) failures++;
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
