// vector_sum_tree: the tree logic attached to the vector of processors that
// adds a vector up without involving the VLIW controller.
//
// Each processor presents a masked pixel and a "contrib" flag; a lane that
// does not contribute counts as zero. The tree adds pairs level by level with
// a register after every level, so it accepts one vector per cycle. The
// output is the sign-extended sum (SUM_W bits, enough for 64 lanes) and the OR
// of the contributing lanes' mask bits. Selecting one lane turns the same
// tree into a read-out multiplexer for that lane's pixel.
//
// Timing: the sum of the vector presented with in_valid in cycle t appears
// with out_valid in cycle t + LAT, LAT = 1 + ceil(log2(N)). The registered
// pipeline and the mask OR are this design's own choices.
module vector_sum_tree
  import vcp_pkg::*;
#(
  parameter int N = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      contrib [N],
  input  mpix_t     pix     [N],
  output logic      out_valid,
  output out_word_t out_word
);
  localparam int L = (N > 1) ? $clog2(N) : 0;
  localparam int P = 2**L;
  localparam int LAT = L + 1;

  typedef struct packed {
    logic                    mask;
    logic signed [SUM_W-1:0] sum;
  } node_t;

  // level 0 register: masked-off lanes forced to zero
  node_t lvl0 [P];
  logic  vld  [LAT];

  for (genvar i = 0; i < P; i++) begin : g_in
    node_t d;
    if (i < N) begin : g_lane
      assign d.mask = contrib[i] & pix[i].mask;
      assign d.sum  = contrib[i] ? SUM_W'(pix[i].val) : '0;
    end else begin : g_pad
      assign d = '0;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) lvl0[i] <= '0;
      else        lvl0[i] <= d;
    end
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int CNT = P >> l;
    node_t q [CNT];
    for (genvar i = 0; i < CNT; i++) begin : g_add
      node_t x, y;
      if (l == 1) begin : g_first
        assign x = lvl0[2*i];
        assign y = lvl0[2*i+1];
      end else begin : g_next
        assign x = g_lvl[l-1].q[2*i];
        assign y = g_lvl[l-1].q[2*i+1];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q[i] <= '0;
        else begin
          q[i].sum  <= x.sum + y.sum;
          q[i].mask <= x.mask | y.mask;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) vld[i] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int i = 1; i < LAT; i++) vld[i] <= vld[i-1];
    end
  end

  node_t top_node;
  if (L == 0) begin : g_single
    assign top_node = lvl0[0];
  end else begin : g_multi
    assign top_node = g_lvl[L].q[0];
  end

  assign out_valid     = vld[LAT-1];
  assign out_word.mask = top_node.mask;
  assign out_word.sum  = top_node.sum;
endmodule
