// pipe_delay: pipelined registers, a DEPTH-stage shift register of W-bit words.
//
// Used to keep data aligned across the pipeline: the input vector waits one
// cycle beside the comparison module, x'_i waits for the second pass, and the
// leading-one position k waits beside the log module. q equals d delayed by
// DEPTH clocks (DEPTH >= 1). No reset: the contents are data whose validity is
// tracked by the control unit.
//
// Interface: clk, d[W-1:0] -> q[W-1:0], latency DEPTH.
module pipe_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    r[0] <= d;
    for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
  end

  assign q = r[DEPTH-1];
endmodule
