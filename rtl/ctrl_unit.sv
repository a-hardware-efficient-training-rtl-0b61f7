// ctrl_unit: control unit scheduling the shared subtraction and exponent modules.
//
// Each vector uses the subtraction module twice: one cycle after acceptance
// (x_i - x_max) and P2_OFF cycles later (x'_i - log2(sum)). A shift register
// of acceptance flags, one bit per cycle of the pipeline, drives everything:
//   * sel_pass2 is the flag of the vector accepted P2_OFF+1 cycles earlier, so
//     the mux hands the subtraction module to that vector's second pass;
//   * in_ready is low in the cycle whose first pass would collide with such a
//     second pass (a vector was accepted P2_OFF cycles earlier);
//   * out_valid is the flag of the vector accepted LAT cycles earlier.
// A vector is accepted when in_valid && in_ready. With back-to-back requests
// the unit accepts P2_OFF vectors, then pauses P2_OFF cycles: the shared
// modules give one vector per two cycles on average.
// The document shows the control unit driving the mux and the exponent module
// but does not describe it; this schedule, the ready/valid handshake and the
// synchronous active-low reset are this design's choice.
//
// Interface: clk, rst_n, in_valid -> in_ready, sel_pass2, out_valid.
module ctrl_unit #(
  parameter int unsigned P2_OFF = 12,  // cycles between first and second pass
  parameter int unsigned LAT    = 18   // acceptance to result
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic sel_pass2,
  output logic out_valid
);
  // sr[j]: a vector was accepted j+1 cycles ago
  logic [LAT-1:0] sr;
  logic           fire;

  assign in_ready  = !sr[P2_OFF-1];
  assign fire      = in_valid && in_ready;
  assign sel_pass2 = sr[P2_OFF];
  assign out_valid = sr[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[LAT-2:0], fire};
  end

  // The subtraction module must never be claimed by both passes at once.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(sr[0] && sr[P2_OFF]));
endmodule
