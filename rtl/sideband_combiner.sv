// sideband_combiner: adds or subtracts the two aligned branches to keep one
// sideband and cancel the other.
//
// upper_i is the delayed sine branch, shifted_i the Hilbert-shifted cosine
// branch.  Their sum keeps the lower sideband (signals below the local
// oscillator) and their difference the upper sideband.  The result is
// saturated to W bits and registered on clocks with en_i high (the sample
// strobe): one strobe of latency.  sideband_i may
// change at any clock and acts on the next output.
//
// The sum/difference rule for LSB/USB follows the design; saturation and the
// output register are this design's choices.
module sideband_combiner #(
  parameter int unsigned W = dbbc_pkg::DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  dbbc_pkg::sideband_e sideband_i,
  input  logic signed [W-1:0] upper_i,
  input  logic signed [W-1:0] shifted_i,
  output logic signed [W-1:0] y_o
);

  logic signed [W:0] sum;

  always_comb begin
    if (sideband_i == dbbc_pkg::SB_LSB) sum = upper_i + shifted_i;
    else                                sum = upper_i - shifted_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y_o <= '0;
    else if (en_i) y_o <= dbbc_pkg::sat_dw(64'(sum));
  end

endmodule
