// vliw_buffer_tree: distributes the VLIW bus from the controller to every
// processor through a tree of registers, so that no net drives more than
// FANOUT loads. This is the source design's answer to the high fan-out of a
// bus over 100 bits wide feeding many processors: the bus is delayed by the
// depth of the tree, which costs latency but not throughput.
//
// Structure: level 0 is one register fed by "root"; level l+1 has
// ceil(N/FANOUT^(LEVELS-1-(l+1))) registers, node i of it fed by node
// i/FANOUT of level l; the last level has exactly N registers, one per
// processor. Latency from root to leaf is LEVELS cycles, where
// LEVELS = ceil(log_FANOUT(N)) + 1. The fan-out of 4 is this design's choice.
module vliw_buffer_tree #(
  parameter int N      = 32,
  parameter int W      = 93,
  parameter int FANOUT = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] root,
  output logic [W-1:0] leaf [N]
);
  // nodes at a level: ceil(N / FANOUT^(LEVELS-1-lvl))
  function automatic int nodes_at(int lvl, int levels, int n, int f);
    int d = 1;
    for (int i = 0; i < levels - 1 - lvl; i++) d = d * f;
    return (n + d - 1) / d;
  endfunction

  localparam int LEVELS = vcp_pkg::clog_base(N, FANOUT) + 1;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int CNT = nodes_at(l, LEVELS, N, FANOUT);
    logic [W-1:0] q [CNT];
    for (genvar i = 0; i < CNT; i++) begin : g_node
      logic [W-1:0] d;
      if (l == 0) begin : g_root
        assign d = root;
      end else begin : g_inner
        assign d = g_level[l-1].q[i/FANOUT];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q[i] <= '0;
        else        q[i] <= d;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign leaf[i] = g_level[LEVELS-1].q[i];
  end
endmodule
