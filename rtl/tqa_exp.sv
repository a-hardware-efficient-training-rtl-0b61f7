// tqa_exp: base-2 exponential of a non-positive fixed-point number.
//
// The input x <= 0 is two's complement with X_F fraction bits. Its integer
// field a = floor(x) and fraction field b = x - a in [0,1) are read directly
// from the bit pattern (the "separation": no logic). 2^b in [1,2) comes from the
// quadratic unit with N0 = 4, and 2^x = 2^b >> (-a). The shift amount travels
// alongside the unit's four pipeline stages and the barrel shift is applied to
// the unit's registered output, so the result follows the input by 4 cycles.
// Shifts of 31 or more are clamped to 31, which flushes the result to zero.
//
// Follows the document: separation of a and b, the TQA unit for 2^b and the
// right shift by -a. This design's own choices: the clamp of the shift amount
// and placing the shifter after the unit's last register.
//
// Interface: clk, x[D_W-1:0] (signed, must be <= 0) -> y[TQA_OUT_F:0]
// (unsigned, TQA_OUT_F fraction bits), latency 4.
module tqa_exp
  import tqa_pkg::*;
#(
  parameter int unsigned D_W = 28,  // input width (sign + integer + fraction)
  parameter int unsigned X_F = 21   // input fraction bits
) (
  input  logic                  clk,
  input  logic signed [D_W-1:0] x,
  output logic [TQA_OUT_F:0]    y
);
  localparam int unsigned A_W = D_W - X_F;  // width of the integer field a

  // separation
  logic signed [A_W-1:0] a;
  logic [X_F-1:0]        b;
  assign {a, b} = x;

  // shift amount -a, clamped to 0..31
  logic [4:0] sh;
  always_comb begin
    if (a >= 0)        sh = '0;
    else if (a < -31)  sh = 5'd31;
    else               sh = 5'(-a);
  end

  logic [4:0] sh_q [4];
  always_ff @(posedge clk) begin
    sh_q[0] <= sh;
    for (int i = 1; i < 4; i++) sh_q[i] <= sh_q[i-1];
  end

  logic [TQA_OUT_F:0] pow_b;
  tqa_unit #(
    .FUNC(TQA_EXP), .IN_F(X_F), .N0(4), .N1(16), .W2_F(16), .W1_F(20), .W0_F(TQA_OUT_F),
    .A1_F(24), .A2_F(24), .A3_F(24), .SQ_L(8), .P2_LA(8), .P2_LB(8), .P1_LA(10), .P1_LB(9)
  ) u_unit (.clk(clk), .x(b), .y(pow_b));

  assign y = pow_b >> sh_q[3];
endmodule
