// decimation_cascade: run-time selectable further decimation of one branch
// after the poly-phase decimator, setting the channel bandwidth.
//
// STAGES half-band decimate-by-2 stages are chained.  dec_sel chooses the
// tap point: 0 passes the poly-phase output through at the full clock rate,
// d (1..STAGES) takes the output of stage d, i.e. decimation by 2^d more.
// The selected sample and its strobe are registered into y_o / valid_o, so
// the output rate is f_clk / 2^dec_sel.  Values of dec_sel above STAGES act
// as STAGES.  Both branches of a channel use identical cascades with the same
// dec_sel, so their strobes coincide.
//
// Timing: one clock of latency for dec_sel = 0, plus one clock per stage
// used.  Changing dec_sel takes effect on the next clock; the filters after
// the cascade then need to refill.
//
// A cascade of multi-rate filters follows the design's block diagram; the
// number of stages, half-band filters and run-time selection are this
// design's choices.
module decimation_cascade #(
  parameter int unsigned W      = dbbc_pkg::DW,
  parameter int unsigned STAGES = 3,
  parameter int unsigned SEL_W  = $clog2(STAGES + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SEL_W-1:0]    dec_sel,
  input  logic                valid_i,
  input  logic signed [W-1:0] x_i,
  output logic                valid_o,
  output logic signed [W-1:0] y_o
);

  logic                stage_v [STAGES+1];
  logic signed [W-1:0] stage_x [STAGES+1];
  logic [SEL_W-1:0]    sel;

  assign stage_v[0] = valid_i;
  assign stage_x[0] = x_i;

  for (genvar d = 0; d < STAGES; d++) begin : g_stage
    halfband_decimator #(.W(W)) u_hb (
      .clk, .rst_n,
      .valid_i(stage_v[d]), .x_i(stage_x[d]),
      .valid_o(stage_v[d+1]), .y_o(stage_x[d+1])
    );
  end

  if ((1 << SEL_W) - 1 > STAGES) begin : g_clamp
    assign sel = (dec_sel > SEL_W'(STAGES)) ? SEL_W'(STAGES) : dec_sel;
  end else begin : g_full_range
    assign sel = dec_sel;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      y_o     <= '0;
    end else begin
      valid_o <= stage_v[sel];
      if (stage_v[sel]) y_o <= stage_x[sel];
    end
  end

endmodule
