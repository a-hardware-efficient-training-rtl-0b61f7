// cmp_max: comparison module, maximum of N signed inputs.
//
// A binary tree of two-input comparators (all comparisons of one level run in
// parallel) selects the largest input; the result is registered, so x_max
// appears one clock after the inputs. N need not be a power of two: the tree
// is laid out as a heap of 2N-1 nodes whose last N nodes are the inputs.
// The document names the module and its job ("parallel comparisons to
// determine the maximum value"); the tree shape and the single output register
// are this design's choice.
//
// Interface: clk, x[N] (signed W bits) -> xmax (signed W bits), latency 1.
module cmp_max #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 26
) (
  input  logic                clk,
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] xmax
);
  logic signed [W-1:0] node [2*N-1];

  for (genvar i = 0; i < 2 * N - 1; i++) begin : g_node
    if (i >= N - 1) begin : g_leaf
      assign node[i] = x[i-(N-1)];
    end else begin : g_cmp
      assign node[i] = (node[2*i+1] >= node[2*i+2]) ? node[2*i+1] : node[2*i+2];
    end
  end

  always_ff @(posedge clk) xmax <= node[0];
endmodule
