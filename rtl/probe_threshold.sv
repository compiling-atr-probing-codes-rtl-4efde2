// probe_threshold -- the threshold operators of one vehicle: one per distinct probe.
//
// Each distinct probe u names two pixels of the STRIP_ROWS x 4 window (atr_pkg::probe_geom).  Its
// hit bit is 1 when the absolute difference of the two pixels exceeds `threshold`.  All
// N_UNIQUE operators work in parallel on every window; the hit vector is registered, so hits,
// valid and position appear one clock after the window.  The comparison rule follows the
// published probe definition; the single run-time threshold shared by all probes is this
// design's choice (the threshold value is not published).
module probe_threshold
  import atr_pkg::*;
#(
  parameter int VEH        = 0,
  parameter int N_UNIQUE   = atr_pkg::N_UNIQUE_V[VEH],
  parameter int STRIP_ROWS = atr_pkg::WIN_ROWS,
  parameter int WIN_COLS   = atr_pkg::PROBE_COLS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] threshold,
  input  logic             win_valid,
  input  pos_t             win_pos,
  input  logic [PIX_W-1:0] win [STRIP_ROWS][WIN_COLS],
  output logic             hit_valid,
  output pos_t             hit_pos,
  output logic [N_UNIQUE-1:0] hits
);
  logic [N_UNIQUE-1:0] hits_d;

  for (genvar u = 0; u < N_UNIQUE; u++) begin : g_probe
    localparam probe_geom_t G = probe_geom(VEH, u);
    logic [PIX_W-1:0] a, b, diff;
    assign a      = win[G.r1][G.c1];
    assign b      = win[G.r2][G.c2];
    assign diff   = (a > b) ? a - b : b - a;
    assign hits_d[u] = diff > threshold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_valid <= 1'b0; hit_pos <= '0; hits <= '0;
    end else begin
      hit_valid <= win_valid;
      if (win_valid) begin
        hit_pos <= win_pos;
        hits    <= hits_d;
      end
    end
  end
endmodule
