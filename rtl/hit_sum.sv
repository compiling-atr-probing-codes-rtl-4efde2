// hit_sum -- sum tree: counts the hit bits of one probe set.
//
// Adds N one-bit inputs in a balanced binary tree of adders: the inputs are padded with zeros to
// a power of two P and placed at the leaves of a heap-numbered tree (node k has children 2k+1
// and 2k+2), and every inner node adds its two children.  The root is the COUNT_W-bit count.
// Purely combinational; the probe engine registers the result.  The sum tree follows the
// published loop body; the engine feeds unused inputs with 0, so one tree size serves every
// probe set of a vehicle.
module hit_sum #(
  parameter int N       = 35,
  parameter int COUNT_W = $clog2(N + 1)
) (
  input  logic [N-1:0]       bits,
  output logic [COUNT_W-1:0] count
);
  localparam int LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int P      = 1 << LEVELS;

  logic [COUNT_W-1:0] node [2*P-1];

  for (genvar l = 0; l < P; l++) begin : g_leaf
    if (l < N) begin : g_used
      assign node[P-1+l] = COUNT_W'(bits[l]);
    end else begin : g_pad
      assign node[P-1+l] = '0;
    end
  end

  for (genvar k = 0; k < P - 1; k++) begin : g_node
    assign node[k] = node[2*k+1] + node[2*k+2];
  end

  assign count = node[0];
endmodule
