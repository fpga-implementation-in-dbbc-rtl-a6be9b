// ddr_input_deser: double-data-rate capture and serial-to-parallel
// conversion of the sampler output.
//
// The A/D sampler delivers its samples time-interleaved on two buses, A and
// P, each changing on both edges of the sampler clock clk_ddr.  Samples 1 and
// 2 (A and P) are captured on the rising edge, samples 3 and 4 (A and P) on
// the falling edge.  A second clock, clk_proc, of the same frequency but
// shifted by 90 degrees and inverted (its rising edge comes 3/4 of a period
// after the rising edge of clk_ddr), re-registers all four together, so
// the rest of the design sees M = 4 parallel samples per clk_proc cycle, at
// a quarter of the sample rate.
//
// Interface: lane k of samples_o holds sample 4n+k+1 of the time sequence,
// lane 0 being the oldest.  samples_o is updated one clk_proc rising edge
// after the falling edge that captured samples 3 and 4.
//
// The capture scheme follows the two-bus DDR timing of the design; the
// exact phase of clk_proc (rising at 270 degrees) and the absence of a reset
// on the pure data registers are this design's choices.
module ddr_input_deser #(
  parameter int unsigned W = dbbc_pkg::ADC_W
) (
  input  logic                clk_ddr,
  input  logic                clk_proc,
  input  logic signed [W-1:0] a_bus,
  input  logic signed [W-1:0] p_bus,
  output logic signed [W-1:0] samples_o [4]
);

  logic signed [W-1:0] a_rise, p_rise, a_fall, p_fall;

  // Rising edge: samples 1 (A bus) and 2 (P bus).
  always_ff @(posedge clk_ddr) begin
    a_rise <= a_bus;
    p_rise <= p_bus;
  end

  // Falling edge: samples 3 (A bus) and 4 (P bus).
  always_ff @(negedge clk_ddr) begin
    a_fall <= a_bus;
    p_fall <= p_bus;
  end

  // Shifted clock: all four in parallel, in time order.
  always_ff @(posedge clk_proc) begin
    samples_o[0] <= a_rise;
    samples_o[1] <= p_rise;
    samples_o[2] <= a_fall;
    samples_o[3] <= p_fall;
  end

endmodule
