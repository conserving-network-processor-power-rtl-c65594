// threshold_unit: the threshold th that the idle-thread count must exceed.
//
// Static scheme (dynamic_en = 0): th stays at TH_INIT.
// Dynamic scheme (dynamic_en = 1): at every window end th is lowered by DELTA
// when the window saw no buffer pressure (shutting PEs down was harmless, so be
// more aggressive) and raised by DELTA when it did (too few PEs, be more
// cautious). th is kept within [TH_MIN, TH_MAX].
// Defaults: TH_INIT is half the one-million-cycle window and DELTA is 2% of it,
// both from the evaluated configuration; the bounds are this design's choice.
// Timing: th is registered and changes the cycle after period_end.
module threshold_unit #(
  parameter int unsigned W       = 20,
  parameter int unsigned TH_INIT = 500_000,
  parameter int unsigned DELTA   = 10_000,
  parameter int unsigned TH_MIN  = 10_000,
  parameter int unsigned TH_MAX  = 990_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dynamic_en,
  input  logic         period_end,
  input  logic         pressure_seen,
  output logic [W-1:0] th
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th <= W'(TH_INIT);
    end else if (!dynamic_en) begin
      th <= W'(TH_INIT);
    end else if (period_end) begin
      if (pressure_seen)
        th <= (th >= W'(TH_MAX - DELTA)) ? W'(TH_MAX) : th + W'(DELTA);
      else
        th <= (th <= W'(TH_MIN + DELTA)) ? W'(TH_MIN) : th - W'(DELTA);
    end
  end

endmodule
