// sub_module: subtraction module, N lane-parallel subtractors.
//
// Every lane computes d_i = a_i - b with a shared subtrahend b and registers
// it (latency 1). Used twice per vector: x_i - x_max and x'_i - log2(sum).
// The operand width W leaves headroom so that neither difference overflows.
// Function from the document; registering the output is this design's choice
// of pipeline cut.
//
// Interface: clk, a[N], b -> d[N] (all signed W bits), latency 1.
module sub_module #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 28
) (
  input  logic                clk,
  input  logic signed [W-1:0] a [N],
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] d [N]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) d[i] <= a[i] - b;
  end
endmodule
