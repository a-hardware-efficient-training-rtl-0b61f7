// adder_tree: pipelined adder tree summing N unsigned values.
//
// Level l adds pairs of level l-1 and registers them, growing the width by one
// bit per level, so the total of N = 2^L inputs appears L clocks later (3 for
// N = 8, matching the document's three adder-tree cycles). The sum never
// overflows: OUT_W = IN_W + L.
//
// Interface: clk, e[N] (IN_W bits) -> sum (IN_W + clog2(N) bits), latency
// clog2(N). N must be a power of two.
module adder_tree #(
  parameter int unsigned N    = 8,
  parameter int unsigned IN_W = 25
) (
  input  logic                        clk,
  input  logic [IN_W-1:0]             e   [N],
  output logic [IN_W+$clog2(N)-1:0]   sum
);
  localparam int unsigned L     = $clog2(N);
  localparam int unsigned OUT_W = IN_W + L;

  // lvl[l][j]: j-th partial sum of level l (level 0 = inputs)
  logic [OUT_W-1:0] lvl [L+1][N];

  for (genvar j = 0; j < N; j++) begin : g_in
    assign lvl[0][j] = OUT_W'(e[j]);
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar j = 0; j < (N >> l); j++) begin : g_add
      always_ff @(posedge clk) lvl[l][j] <= lvl[l-1][2*j] + lvl[l-1][2*j+1];
    end
    for (genvar j = (N >> l); j < N; j++) begin : g_unused
      assign lvl[l][j] = '0;
    end
  end

  assign sum = lvl[L][0];

  if ((1 << L) != N) begin : g_bad_n
    $error("adder_tree: N must be a power of two");
  end
endmodule
