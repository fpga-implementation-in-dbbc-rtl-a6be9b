// dbbc_top: digital base-band converter in the down-converter configuration.
//
// The A/D sampler's two time-interleaved buses are captured on both edges
// of the sampler clock and turned into M = 4 parallel samples per
// processing clock (ddr_input_deser).  NCH independent down-converter
// channels (ddc_channel) share these samples; each has its own local
// oscillator frequency (ftw), sideband selection and decimation setting
// (dec_sel), and delivers real base-band samples at f_clk / 2^dec_sel,
// marked by bb_valid_o.
//
// Clocks: clk_ddr is the sampler's data clock (f_s / 4, data on both edges);
// clk_proc has the same frequency, shifted by 90 degrees and inverted, and
// clocks everything after the capture.  The 90-degree clock itself is
// generated outside (a clock manager of the FPGA).  rst_n is synchronous to
// clk_proc and active low.
//
// The structure follows the design; the number of channels is this
// design's choice, as the number that fits depends on the FPGA's resources.
module dbbc_top #(
  parameter int unsigned NCH     = 4,
  parameter int unsigned ADC_W   = dbbc_pkg::ADC_W,
  parameter int unsigned PHASE_W = dbbc_pkg::PHASE_W,
  parameter int unsigned DW      = dbbc_pkg::DW,
  parameter int unsigned DEC_STAGES = 3,
  parameter int unsigned SEL_W   = $clog2(DEC_STAGES + 1)
) (
  input  logic                    clk_ddr,
  input  logic                    clk_proc,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] a_bus,
  input  logic signed [ADC_W-1:0] p_bus,
  input  logic [PHASE_W-1:0]      ftw        [NCH],
  input  dbbc_pkg::sideband_e     sideband_i [NCH],
  input  logic [SEL_W-1:0]        dec_sel    [NCH],
  output logic                    bb_valid_o [NCH],
  output logic signed [DW-1:0]    bb_o       [NCH]
);

  localparam int unsigned M = dbbc_pkg::M;

  logic signed [ADC_W-1:0] samples [M];

  ddr_input_deser #(
    .W(ADC_W)
  ) u_deser (
    .clk_ddr, .clk_proc, .a_bus, .p_bus, .samples_o(samples)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    ddc_channel #(
      .M(M), .ADC_W(ADC_W), .PHASE_W(PHASE_W), .DW(DW), .DEC_STAGES(DEC_STAGES)
    ) u_ch (
      .clk(clk_proc), .rst_n, .samples_i(samples), .ftw(ftw[c]),
      .sideband_i(sideband_i[c]), .dec_sel(dec_sel[c]),
      .valid_o(bb_valid_o[c]), .y_o(bb_o[c])
    );
  end

endmodule
