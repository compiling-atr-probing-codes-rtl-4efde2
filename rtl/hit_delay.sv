// hit_delay -- delay lines for temporal common-subexpression elimination.
//
// A probe set spans up to PS_COLS image columns, but every probe in it is only PROBE_COLS wide.
// Instead of evaluating the same pixel-pair pattern at several horizontal offsets, each distinct
// probe is evaluated once per window (probe_threshold) and its hit bit is remembered for
// DEPTH-1 further windows.  Tap d of distinct probe u is the hit bit u computed d windows
// (image columns) earlier; tap 0 is the current hit vector.  A probe of a probe set that sits d
// columns to the left of the probe set's right edge reads tap d.
//
// The history shifts on every `in_valid`.  The taps and `out_valid`/`out_pos` are combinational
// copies of the current inputs plus the history, so this block adds no latency.  The reuse of
// results of earlier iterations follows the published optimisation; the shift-register form is
// this design's choice.
module hit_delay
  import atr_pkg::*;
#(
  parameter int N     = 151,
  parameter int DEPTH = atr_pkg::PS_COLS_V[0] - atr_pkg::PROBE_COLS + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  pos_t         in_pos,
  input  logic [N-1:0] in_hits,
  output logic         out_valid,
  output pos_t         out_pos,
  output logic [N-1:0] taps [DEPTH]
);
  logic [N-1:0] hist [1:DEPTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d < DEPTH; d++) hist[d] <= '0;
    end else if (in_valid) begin
      hist[1] <= in_hits;
      for (int d = 2; d < DEPTH; d++) hist[d] <= hist[d-1];
    end
  end

  always_comb begin
    taps[0] = in_hits;
    for (int d = 1; d < DEPTH; d++) taps[d] = hist[d];
  end

  assign out_valid = in_valid;
  assign out_pos   = in_pos;
endmodule
