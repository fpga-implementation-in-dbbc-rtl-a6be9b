// delay_line: fixed delay of the upper (sine) branch that matches the
// latency of the 90-degree Hilbert branch, so both reach the sideband
// combiner aligned in time.
//
// A chain of DEPTH registers, cleared by reset, that shifts on every clock
// with en_i high (the sample strobe); d_o is d_i delayed by DEPTH strobes.
// DEPTH defaults to the Hilbert filter's group delay (15 samples for 31
// taps) plus its one output register.  The delay block is part of
// the design; its depth follows from this design's Hilbert filter length.
module delay_line #(
  parameter int unsigned W     = dbbc_pkg::DW,
  parameter int unsigned DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  if (DEPTH < 1) begin : g_bad_depth
    $error("delay_line: DEPTH must be at least 1");
  end

  logic signed [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en_i) begin
      stage[0] <= d_i;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign d_o = stage[DEPTH-1];

endmodule
