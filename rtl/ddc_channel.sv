// ddc_channel: one independent digital base-band converter channel.
//
// The channel selects a band of the sampled IF signal and converts it to a
// single-sideband real base-band signal.  The M parallel input samples are
// multiplied by a quadrature local oscillator from the parallel DDS, which
// gives a sine (upper) and a cosine (lower) branch.  Each branch passes
// through the multi-rate filters: a poly-phase filter that low-passes and
// decimates by M, so one sample per clock remains, then a cascade of
// half-band stages that decimates by a further 2^dec_sel.  The upper branch
// is then delayed and the lower branch shifted by 90 degrees in a Hilbert
// filter; their sum keeps the lower sideband, their difference the upper
// sideband.  A final shape filter sets the band-pass shape.
//
// Interface: samples_i carries M samples per clock (lane 0 oldest); ftw is
// the local-oscillator phase step per input sample,
// f_lo * 2^PHASE_W / f_s; sideband_i picks LSB or USB; dec_sel (0..3) sets
// the output rate f_clk / 2^dec_sel and with it the channel bandwidth.
// y_o carries a new base-band sample on each clock where valid_o is high
// (every clock for dec_sel = 0) and holds otherwise.
//
// Timing (dec_sel = 0): the path has 22 pipeline registers (input alignment
// 1, mixer 1, decimator 1, cascade 1, delay or Hilbert 16 including the
// Hilbert group delay of 15, combiner 1, shape filter 1).  With the group
// delays of the decimator (15.5 input samples, about 4 clocks) and of the
// shape filter (15 clocks), a tone's envelope reaches y_o about 41 clocks
// after it enters.  For dec_sel > 0 the stages after the cascade advance
// once per output sample, so their delays scale by 2^dec_sel.  Each channel
// has its own DDS and settings, so several channels work independently on
// the same input.
//
// The chain of blocks follows the design's down-converter diagram; widths,
// filter lengths, coefficients and the selectable half-band cascade are this
// design's choices.
module ddc_channel #(
  parameter int unsigned M         = dbbc_pkg::M,
  parameter int unsigned ADC_W     = dbbc_pkg::ADC_W,
  parameter int unsigned PHASE_W   = dbbc_pkg::PHASE_W,
  parameter int unsigned LO_W      = dbbc_pkg::LO_W,
  parameter int unsigned DW        = dbbc_pkg::DW,
  parameter int unsigned HIL_TAPS  = 31,
  parameter int unsigned DEC_STAGES = 3,
  parameter int unsigned SEL_W     = $clog2(DEC_STAGES + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] samples_i [M],
  input  logic [PHASE_W-1:0]      ftw,
  input  dbbc_pkg::sideband_e     sideband_i,
  input  logic [SEL_W-1:0]        dec_sel,
  output logic                    valid_o,
  output logic signed [DW-1:0]    y_o
);

  localparam int unsigned PROD_W = ADC_W + LO_W;

  logic signed [LO_W-1:0]   lo_sin [M];
  logic signed [LO_W-1:0]   lo_cos [M];
  logic signed [ADC_W-1:0]  x_d    [M];
  logic signed [PROD_W-1:0] mix_upper [M];
  logic signed [PROD_W-1:0] mix_lower [M];
  logic signed [DW-1:0]     pp_upper, pp_lower;
  logic signed [DW-1:0]     bb_upper, bb_lower;
  logic                     bb_valid, bb_valid_lower;
  logic signed [DW-1:0]     upper_delayed, lower_shifted;
  logic signed [DW-1:0]     ssb;

  parallel_dds #(
    .M(M), .PHASE_W(PHASE_W), .LO_W(LO_W)
  ) u_dds (
    .clk, .rst_n, .ftw,
    .sin_o(lo_sin), .cos_o(lo_cos)
  );

  // Align the samples with the registered DDS output.
  always_ff @(posedge clk) x_d <= samples_i;

  quadrature_mixer #(
    .M(M), .IN_W(ADC_W), .LO_W(LO_W)
  ) u_mixer (
    .clk, .x_i(x_d), .sin_i(lo_sin), .cos_i(lo_cos),
    .upper_o(mix_upper), .lower_o(mix_lower)
  );

  polyphase_decimator #(
    .M(M), .IN_W(PROD_W), .OUT_W(DW)
  ) u_lpf_upper (
    .clk, .rst_n, .x_i(mix_upper), .y_o(pp_upper)
  );

  polyphase_decimator #(
    .M(M), .IN_W(PROD_W), .OUT_W(DW)
  ) u_lpf_lower (
    .clk, .rst_n, .x_i(mix_lower), .y_o(pp_lower)
  );

  decimation_cascade #(
    .W(DW), .STAGES(DEC_STAGES)
  ) u_dec_upper (
    .clk, .rst_n, .dec_sel, .valid_i(1'b1), .x_i(pp_upper),
    .valid_o(bb_valid), .y_o(bb_upper)
  );

  decimation_cascade #(
    .W(DW), .STAGES(DEC_STAGES)
  ) u_dec_lower (
    .clk, .rst_n, .dec_sel, .valid_i(1'b1), .x_i(pp_lower),
    .valid_o(bb_valid_lower), .y_o(bb_lower)
  );

  // Both branches are decimated in lockstep.
  a_branches_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                        bb_valid == bb_valid_lower)
    else $error("ddc_channel: branch sample strobes differ");

  delay_line #(
    .W(DW), .DEPTH((HIL_TAPS - 1) / 2 + 1)
  ) u_delay (
    .clk, .rst_n, .en_i(bb_valid), .d_i(bb_upper), .d_o(upper_delayed)
  );

  hilbert_filter #(
    .W(DW)
  ) u_hilbert (
    .clk, .rst_n, .en_i(bb_valid), .x_i(bb_lower), .y_o(lower_shifted)
  );

  sideband_combiner #(
    .W(DW)
  ) u_combine (
    .clk, .rst_n, .en_i(bb_valid), .sideband_i, .upper_i(upper_delayed),
    .shifted_i(lower_shifted), .y_o(ssb)
  );

  shape_filter #(
    .W(DW)
  ) u_shape (
    .clk, .rst_n, .en_i(bb_valid), .x_i(ssb), .y_o
  );

  // y_o has moved on the clock edge where bb_valid was high.
  always_ff @(posedge clk) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= bb_valid;
  end

endmodule
