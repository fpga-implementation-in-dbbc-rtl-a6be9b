// quadrature_mixer: down-conversion of M parallel real samples by the
// quadrature local oscillator.
//
// Each lane k multiplies the input sample by the sine and by the cosine of
// the matching DDS branch, giving the two branches of the converter: the
// sine product (upper branch, later only delayed) and the cosine product
// (lower branch, later shifted by 90 degrees).  Products are full precision
// (IN_W + LO_W bits) and registered: one cycle of latency, one result per
// lane per clock.
//
// The mixer itself follows the converter's block diagram; full-precision
// products and the output register are this design's choices.
module quadrature_mixer #(
  parameter int unsigned M    = dbbc_pkg::M,
  parameter int unsigned IN_W = dbbc_pkg::ADC_W,
  parameter int unsigned LO_W = dbbc_pkg::LO_W
) (
  input  logic                        clk,
  input  logic signed [IN_W-1:0]      x_i     [M],
  input  logic signed [LO_W-1:0]      sin_i   [M],
  input  logic signed [LO_W-1:0]      cos_i   [M],
  output logic signed [IN_W+LO_W-1:0] upper_o [M],
  output logic signed [IN_W+LO_W-1:0] lower_o [M]
);

  always_ff @(posedge clk) begin
    for (int k = 0; k < M; k++) begin
      upper_o[k] <= x_i[k] * sin_i[k];
      lower_o[k] <= x_i[k] * cos_i[k];
    end
  end

endmodule
