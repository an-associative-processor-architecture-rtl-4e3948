// ap_sum_tree - pipelined adder tree summing one bit from every EP.
//
// The source architecture sums the outputs of all active EPs with a tree of
// full adders through which the data flow in a pipelined way; it is used to
// count active EPs and, applied bit plane by bit plane, to form sums. Here
// the tree is binary: level l adds pairs of level l-1 partial sums, one
// register stage per level, so the sum of the N inputs presented in one cycle
// appears LEVELS = ceil(log2 N) cycles later (10 for 1024 EPs) and a new set of
// inputs can enter every cycle. `in_vld` travels alongside as `out_vld`.
// Word-wide adders per node and one register per level are this design's
// choices.
module ap_sum_tree #(
  parameter int unsigned N      = 1024,
  parameter int unsigned LEVELS = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned SW     = LEVELS + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in,
  input  logic          in_vld,
  output logic [SW-1:0] sum,
  output logic          out_vld
);

  localparam int unsigned NP = 1 << LEVELS;

  logic [NP-1:0] in_p;
  logic [LEVELS:0] vld;

  assign in_p   = NP'(in);
  assign vld[0] = in_vld;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NODES = NP >> l;
    logic [l:0] node [NODES];
    for (genvar j = 0; j < NODES; j++) begin : g_node
      if (l == 1) begin : g_leaf
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) node[j] <= '0;
          else        node[j] <= {1'b0, in_p[2*j]} + {1'b0, in_p[2*j+1]};
      end else begin : g_inner
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) node[j] <= '0;
          else        node[j] <= {1'b0, g_lvl[l-1].node[2*j]} + {1'b0, g_lvl[l-1].node[2*j+1]};
      end
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
  end

  assign sum     = SW'(g_lvl[LEVELS].node[0]);
  assign out_vld = vld[LEVELS];

endmodule
