// tqa_log: base-2 logarithm of a mantissa m in [1,2).
//
// The input is the fraction field of m (m = 1 + m_frac * 2^-IN_F). The quadratic
// unit with N0 = 5 (32 segments, quadratic term subtracted) evaluates log2(m);
// the result is kept as a pure fraction in [0,1), clamped below 1, because the
// caller concatenates it with the integer k of the leading-one position.
// Latency is 4 cycles (the unit's four stages), one input per cycle.
//
// Follows the document: the log module built on the TQA unit with N0 = 5. This
// design's own choices: the 24-bit input and output fractions, N1 = 14 and the
// clamp to [0,1).
//
// Interface: clk, m_frac[IN_F-1:0] -> y[TQA_OUT_F-1:0] (fraction of log2 m).
module tqa_log
  import tqa_pkg::*;
#(
  parameter int unsigned IN_F = 24
) (
  input  logic                 clk,
  input  logic [IN_F-1:0]      m_frac,
  output logic [TQA_OUT_F-1:0] y
);
  logic [TQA_OUT_F:0] r;

  tqa_unit #(
    .FUNC(TQA_LOG), .IN_F(IN_F), .N0(5), .N1(14), .W2_F(14), .W1_F(19), .W0_F(TQA_OUT_F),
    .A1_F(24), .A2_F(24), .A3_F(24), .SQ_L(7), .P2_LA(8), .P2_LB(8), .P1_LA(10), .P1_LB(9)
  ) u_unit (.clk(clk), .x(m_frac), .y(r));

  assign y = r[TQA_OUT_F] ? '1 : r[TQA_OUT_F-1:0];
endmodule
