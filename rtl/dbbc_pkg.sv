// dbbc_pkg: types and constants shared by the digital base-band converter.
//
// The converter takes a real sampled IF signal, delivered as M samples per
// processing clock, and turns it into one single-sideband base-band channel
// per down-converter.  The parallel factor M = 4 follows the two-bus,
// double-data-rate input scheme.  The sample, local-oscillator and data
// widths, and the filter coefficient format (signed Q1.15), are this
// design's own choices.
package dbbc_pkg;

  // Parallel branches: 2 input buses x 2 clock edges.
  parameter int unsigned M = 4;

  // A/D sample width (sampler resolution).
  parameter int unsigned ADC_W = 8;

  // Phase accumulator width B_theta and the phase bits used for the lookup.
  parameter int unsigned PHASE_W = 32;
  parameter int unsigned LUT_PHASE_W = 10;

  // Local-oscillator amplitude width (signed, peak +/-127).
  parameter int unsigned LO_W = 8;

  // Width of the data path after the mixers (signed).
  parameter int unsigned DW = 16;

  // Filter coefficients: signed, 15 fraction bits.
  parameter int unsigned COEF_W = 16;
  parameter int unsigned COEF_FRAC = 15;

  // Sideband selection of the I/Q combiner: sum gives the lower sideband,
  // difference gives the upper sideband.
  typedef enum logic {
    SB_LSB = 1'b0,
    SB_USB = 1'b1
  } sideband_e;

  // Saturate a wide signed value into DW bits.
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [63:0] v);
    logic signed [63:0] hi, lo;
    hi = 64'sd1 <<< (DW - 1);
    hi = hi - 64'sd1;
    lo = -(64'sd1 <<< (DW - 1));
    if (v > hi) return hi[DW-1:0];
    if (v < lo) return lo[DW-1:0];
    return v[DW-1:0];
  endfunction

endpackage
