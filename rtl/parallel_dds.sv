// parallel_dds: M-branch direct digital frequency synthesizer producing the
// quadrature local oscillator for M parallel samples per clock.
//
// A phase accumulator of PHASE_W bits advances every clock by the phase
// increment F_cir = M * ftw (mod 2^PHASE_W), where ftw is the phase step of
// one sample, f_out * 2^PHASE_W / f_s.  Since f_s = M * f_clk this is the
// same as F_cir = f_out * 2^PHASE_W / f_clk.  Branch k starts from the
// accumulator plus k * ftw, i.e. the branches differ in initial phase by
// delta_phi = 2*pi*f_out/f_s.  The top LUT_PHASE_W bits of each branch phase
// address a quarter-wave sine table (dds_sine_quarter.hex, 256 entries,
// entry i = round(127 * sin(2*pi*(i+0.5)/1024))); the cosine is read at the
// phase plus a quarter turn.
//
// Timing: sin_o/cos_o lane k at clock n (counted from the first clock after
// reset) correspond to phase (n-1)*F_cir + k*ftw, i.e. the outputs are
// registered one cycle after the accumulator.  ftw may change at any time.
//
// The accumulator law and branch offsets follow the parallel DDS equations
// of the design; accumulator width, table size, amplitude and reset
// behaviour are this design's choices.
module parallel_dds #(
  parameter int unsigned M           = dbbc_pkg::M,
  parameter int unsigned PHASE_W     = dbbc_pkg::PHASE_W,
  parameter int unsigned LUT_PHASE_W = dbbc_pkg::LUT_PHASE_W,
  parameter int unsigned LO_W        = dbbc_pkg::LO_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [PHASE_W-1:0]     ftw,
  output logic signed [LO_W-1:0] sin_o [M],
  output logic signed [LO_W-1:0] cos_o [M]
);

  localparam int unsigned QBITS = LUT_PHASE_W - 2;
  localparam int unsigned QSIZE = 1 << QBITS;

  logic [LO_W-1:0] quarter_rom [QSIZE];
  initial $readmemh("rtl/dds_sine_quarter.hex", quarter_rom);

  logic [PHASE_W-1:0] acc;
  logic [PHASE_W-1:0] f_cir;

  assign f_cir = PHASE_W'(M) * ftw;

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + f_cir;
  end

  // Full-wave sine from the quarter table.
  function automatic logic signed [LO_W-1:0] sine_of(input logic [LUT_PHASE_W-1:0] p);
    logic [QBITS-1:0] idx;
    logic [LO_W-1:0]  mag;
    idx = p[LUT_PHASE_W-2] ? ~p[QBITS-1:0] : p[QBITS-1:0];
    mag = quarter_rom[idx];
    return p[LUT_PHASE_W-1] ? -$signed(mag) : $signed(mag);
  endfunction

  localparam logic [LUT_PHASE_W-1:0] QUARTER_TURN = LUT_PHASE_W'(QSIZE);

  always_ff @(posedge clk) begin
    for (int k = 0; k < M; k++) begin
      logic [LUT_PHASE_W-1:0] pt;
      pt = LUT_PHASE_W'((acc + PHASE_W'(k) * ftw) >> (PHASE_W - LUT_PHASE_W));
      sin_o[k] <= sine_of(pt);
      cos_o[k] <= sine_of(pt + QUARTER_TURN);
    end
  end

endmodule
