// max_tree -- selects the winning probe set: the highest rank and its index.
//
// A balanced binary tree of compare-and-select nodes over N ranks (padded with rank 0 to a power
// of two).  Each node passes on the larger rank with its index; on a tie it keeps the left
// input, so the lowest index among equal ranks wins.  Purely combinational; the probe engine
// registers the result.  The max tree follows the published loop body; the tie rule is this
// design's choice.
module max_tree
  import atr_pkg::*;
#(
  parameter int N = atr_pkg::N_PSETS
) (
  input  logic [RANK_W-1:0] ranks [N],
  output logic [RANK_W-1:0] best_rank,
  output logic [PSET_W-1:0] best_idx
);
  localparam int LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int P      = 1 << LEVELS;

  // heap numbering: node k has children 2k+1 and 2k+2, leaves are P-1 .. 2P-2
  logic [RANK_W-1:0] nr [2*P-1];
  logic [PSET_W-1:0] ni [2*P-1];

  for (genvar l = 0; l < P; l++) begin : g_leaf
    if (l < N) begin : g_used
      assign nr[P-1+l] = ranks[l];
    end else begin : g_pad
      assign nr[P-1+l] = '0;
    end
    assign ni[P-1+l] = PSET_W'(l);
  end

  for (genvar k = 0; k < P - 1; k++) begin : g_node
    wire right_wins = nr[2*k+2] > nr[2*k+1];
    assign nr[k] = right_wins ? nr[2*k+2] : nr[2*k+1];
    assign ni[k] = right_wins ? ni[2*k+2] : ni[2*k+1];
  end

  assign best_rank = nr[0];
  assign best_idx  = ni[0];
endmodule
