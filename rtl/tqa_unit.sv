// tqa_unit: pipelined piecewise-quadratic function unit (TQA scheme).
//
// The input fraction x (IN_F bits) is split MSB to LSB into M0 (N0 bits), M1
// (N1 bits) and M2 (the rest). M0 selects one of 2^N0 coefficient sets
// [w2, w1, w0] (a multiplexer over the constants of tqa_pkg); the unit then
// computes
//     y = w0 + w1*(M1+M2) +/- |w2|*M1^2
// in two parallel branches: the quadratic branch squares M1 and multiplies by
// w2, the linear branch multiplies {M1,M2} by w1 and adds w0. The branches are
// added at the end. FUNC = TQA_EXP gives 2^x for x in [0,1) (quadratic term
// added), FUNC = TQA_LOG gives log2(1+x) for 1+x in [1,2) (term subtracted).
//
// Pipeline (four registers, as in the unit's block diagram):
//   stage 1  coefficient select; register w2, w1, w0, M1, {M1,M2}
//   stage 2  M1^2 (truncated squarer) and w1*{M1,M2} (truncated multiplier)
//   stage 3  w2*M1^2 (truncated multiplier) and w0 + w1*{M1,M2}
//   stage 4  final add, clamp to [0, 2^(OUT_F+1)-1]
// Latency is 4 clock cycles, one new input per cycle. No reset: the datapath
// registers are free-running and validity is tracked outside.
//
// Follows the document: the three-segment split, the two branches, M1^2 in the
// quadratic term and M1+M2 in the linear term, N0 = 4 (exp) and N0 = 5 (log),
// coefficient fraction widths from the error budget with N_ulp = 21, and
// truncated multipliers. This design's own choices: the kept widths of the
// intermediate products (A1_F, A2_F, A3_F = 24), the MSB/LSB split points of
// the truncated multipliers, N1 (16 exp, 14 log), the log input width (24) and
// the output clamp.
//
// Interface: clk, x[IN_F-1:0] -> y[OUT_F:0] (unsigned, OUT_F fraction bits).
module tqa_unit
  import tqa_pkg::*;
#(
  parameter tqa_func_e   FUNC  = TQA_EXP,
  parameter int unsigned IN_F  = 21,  // input fraction bits
  parameter int unsigned N0    = 4,   // index bits (M0)
  parameter int unsigned N1    = 16,  // squared bits (M1)
  parameter int unsigned W2_F  = 16,  // fraction bits of |w2|
  parameter int unsigned W1_F  = 20,  // fraction bits of w1 (one integer bit)
  parameter int unsigned W0_F  = 24,  // fraction bits of w0 (one integer bit) = output fraction
  parameter int unsigned A1_F  = 24,  // fraction bits kept of M1^2
  parameter int unsigned A2_F  = 24,  // fraction bits kept of w2*M1^2
  parameter int unsigned A3_F  = 24,  // fraction bits kept of w1*(M1+M2)
  parameter int unsigned SQ_L  = 8,   // LSB part of M1 in the squarer
  parameter int unsigned P2_LA = 8,   // LSB part of w2
  parameter int unsigned P2_LB = 8,   // LSB part of M1^2
  parameter int unsigned P1_LA = 10,  // LSB part of w1
  parameter int unsigned P1_LB = 9    // LSB part of M1+M2
) (
  input  logic            clk,
  input  logic [IN_F-1:0] x,
  output logic [W0_F:0]   y
);
  localparam int unsigned M12_W   = IN_F - N0;
  localparam int unsigned SQ_DROP = 2 * (N0 + N1) - A1_F;
  localparam int unsigned SQ_W    = 2 * N1 - SQ_DROP;
  localparam int unsigned P2_DROP = W2_F + A1_F - A2_F;
  localparam int unsigned P2_W    = W2_F + SQ_W - P2_DROP;
  localparam int unsigned W1_W    = W1_F + 1;
  localparam int unsigned W0_W    = W0_F + 1;
  localparam int unsigned P1_DROP = W1_F + IN_F - A3_F;
  localparam int unsigned P1_W    = W1_W + M12_W - P1_DROP;
  localparam int unsigned S_W     = W0_F + 3;  // signed sum width

  // ---- stage 1: coefficient select ------------------------------------------
  logic [N0-1:0]    m0;
  logic [N1-1:0]    m1;
  logic [M12_W-1:0] m12;
  tqa_coef_t        coef;

  assign m0   = x[IN_F-1 -: N0];
  assign m12  = x[M12_W-1:0];
  assign m1   = x[M12_W-1 -: N1];
  assign coef = tqa_coef(FUNC, 5'(m0));

  logic [W2_F-1:0]  s1_w2;
  logic [W1_W-1:0]  s1_w1;
  logic [W0_W-1:0]  s1_w0;
  logic [N1-1:0]    s1_m1;
  logic [M12_W-1:0] s1_m12;

  always_ff @(posedge clk) begin
    s1_w2  <= coef.w2[W2_F-1:0];
    s1_w1  <= coef.w1[W1_W-1:0];
    s1_w0  <= coef.w0[W0_W-1:0];
    s1_m1  <= m1;
    s1_m12 <= m12;
  end

  // ---- stage 2: M1^2 and w1*(M1+M2) -----------------------------------------
  logic [SQ_W-1:0] sq;
  logic [P1_W-1:0] p1;

  trunc_square #(.W(N1), .L(SQ_L), .DROP(SQ_DROP)) u_sq (.m(s1_m1), .p(sq));
  trunc_mult #(.WA(W1_W), .WB(M12_W), .LA(P1_LA), .LB(P1_LB), .DROP(P1_DROP))
    u_p1 (.a(s1_w1), .b(s1_m12), .p(p1));

  logic [W2_F-1:0] s2_w2;
  logic [W0_W-1:0] s2_w0;
  logic [SQ_W-1:0] s2_sq;
  logic [P1_W-1:0] s2_p1;

  always_ff @(posedge clk) begin
    s2_w2 <= s1_w2;
    s2_w0 <= s1_w0;
    s2_sq <= sq;
    s2_p1 <= p1;
  end

  // ---- stage 3: w2*M1^2 and w0 + w1*(M1+M2) ---------------------------------
  logic [P2_W-1:0] p2;

  trunc_mult #(.WA(W2_F), .WB(SQ_W), .LA(P2_LA), .LB(P2_LB), .DROP(P2_DROP))
    u_p2 (.a(s2_w2), .b(s2_sq), .p(p2));

  logic [S_W-1:0] s3_lin;
  logic [S_W-1:0] s3_quad;

  always_ff @(posedge clk) begin
    s3_lin  <= S_W'(s2_w0) + (S_W'(s2_p1) << (W0_F - A3_F));
    s3_quad <= S_W'(p2) << (W0_F - A2_F);
  end

  // ---- stage 4: final add and clamp -----------------------------------------
  logic signed [S_W-1:0] sum;

  always_comb begin
    if (FUNC == TQA_LOG) sum = signed'(s3_lin - s3_quad);
    else                 sum = signed'(s3_lin + s3_quad);
  end

  always_ff @(posedge clk) begin
    if (sum < 0)                       y <= '0;
    else if (sum[S_W-2:W0_W] != '0)    y <= '1;
    else                               y <= sum[W0_W-1:0];
  end

  // M2 takes the IN_F - N0 - N1 bits below M1; the split must leave it >= 0.
  if (N0 + N1 > IN_F) begin : g_bad_split
    $error("tqa_unit: N0 + N1 exceeds IN_F");
  end
endmodule
