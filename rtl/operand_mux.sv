// operand_mux: operand selection in front of the shared subtraction module.
//
// First pass (sel_pass2 = 0): minuend x_i, subtrahend x_max, giving
// x'_i = x_i - x_max. Second pass (sel_pass2 = 1): minuend x'_i, subtrahend
// log2(sum), giving the exponent of the final result. Combinational.
// The two operand pairs come from the document's overall block diagram; the
// select polarity is this design's choice.
//
// Interface: sel_pass2, x[N], xp[N], xmax, lse -> a[N], b (all signed W bits).
module operand_mux #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 28
) (
  input  logic                sel_pass2,
  input  logic signed [W-1:0] x   [N],
  input  logic signed [W-1:0] xp  [N],
  input  logic signed [W-1:0] xmax,
  input  logic signed [W-1:0] lse,
  output logic signed [W-1:0] a   [N],
  output logic signed [W-1:0] b
);
  always_comb begin
    for (int i = 0; i < N; i++) a[i] = sel_pass2 ? xp[i] : x[i];
    b = sel_pass2 ? lse : xmax;
  end
endmodule
