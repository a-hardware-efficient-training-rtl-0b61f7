// tqa_softmax: N-way base-2 softmax for training-grade precision.
//
// Computes f2(x_i) = 2^(x_i - x_max - log2(sum_j 2^(x_j - x_max))) for a vector
// of N signed fixed-point inputs (X_I integer, X_F fraction bits). Subtracting
// x_max keeps every exponential in (0,1]; the log-sum-exp form turns the
// division into a subtraction. Both nonlinear operators reduce to small ranges:
// 2^b for b in [0,1) (then a right shift by the integer part) and log2(m) for m
// in [1,2) (after a leading-one detector), each evaluated by a piecewise
// quadratic unit.
//
// Datapath (cycle = clock edge after acceptance at edge 0):
//   0      comparison module registers x_max; x_i waits in a register
//   1      pass 1: subtraction registers x'_i = x_i - x_max
//   2-5    exponent modules: exp1_i = 2^x'_i
//   6-8    adder tree: sum
//   9-12   LOD (combinational) + log module: log2(m); k waits beside it
//   13     pass 2: the same subtraction module registers x'_i - log2(sum),
//          log2(sum) = {k, log2 m} (concatenation, no adder)
//   14-17  the same exponent modules: f2(x_i), out_valid
// Latency is 18 cycles. Because the subtraction and exponent modules are
// shared by the two passes, the control unit holds in_ready low in cycles whose
// first pass would collide with a second pass; sustained throughput is one
// vector every two cycles.
//
// Formats: in_x signed, 1 + X_I + X_F bits. x'_i and the second-pass exponent
// use D_W = X_W + 2 bits so they cannot overflow. out_y is unsigned with 24
// fraction bits (value in [0,1], 25 bits). log2(sum) is truncated to X_F
// fraction bits before the second subtraction (the lowest 24 - X_F bits of
// log2 m are unused on purpose).
//
// From the document: the block structure and operand reuse, the 8 lanes, the
// 4.21 input format, the 4-cycle exponent and log modules, the 3-cycle adder
// tree and the 18-cycle total. This design's own choices: the sign bit on top
// of the 4 integer bits, all other widths, the handshake and the schedule.
//
// Interface: clk, rst_n (synchronous, active low, clears the control state),
// in_valid/in_ready/in_x[N], out_valid/out_y[N].
module tqa_softmax
  import tqa_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned X_I = 4,
  parameter int unsigned X_F = 21
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic signed [X_I+X_F:0]      in_x  [N],
  output logic                         out_valid,
  output logic        [TQA_OUT_F:0]    out_y [N]
);
  localparam int unsigned X_W      = X_I + X_F + 1;
  localparam int unsigned D_W      = X_W + 2;
  localparam int unsigned E_W      = TQA_OUT_F + 1;
  localparam int unsigned LG_N     = $clog2(N);
  localparam int unsigned SUM_W    = E_W + LG_N;
  localparam int unsigned K_W      = $clog2(SUM_W - TQA_OUT_F);
  localparam int unsigned LAT_EXP  = 4;
  localparam int unsigned LAT_LOG  = 4;
  localparam int unsigned P2_OFF   = LAT_EXP + LG_N + LAT_LOG + 1;
  localparam int unsigned LAT      = 2 + P2_OFF + LAT_EXP;

  // ---- control unit ---------------------------------------------------------
  logic sel_pass2;

  ctrl_unit #(.P2_OFF(P2_OFF), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .sel_pass2, .out_valid
  );

  // ---- comparison module and input register ---------------------------------
  logic signed [X_W-1:0] xmax;
  cmp_max #(.N(N), .W(X_W)) u_cmp (.clk, .x(in_x), .xmax);

  logic [N*X_W-1:0] x_packed, x_packed_q;
  logic signed [X_W-1:0] x_q [N];
  for (genvar i = 0; i < N; i++) begin : g_xpack
    assign x_packed[i*X_W +: X_W] = in_x[i];
    assign x_q[i] = x_packed_q[i*X_W +: X_W];
  end
  pipe_delay #(.W(N*X_W), .DEPTH(1)) u_xreg (.clk, .d(x_packed), .q(x_packed_q));

  // ---- mux and shared subtraction module ------------------------------------
  logic signed [D_W-1:0] mx_x [N];
  logic signed [D_W-1:0] mx_xp [N];
  logic signed [D_W-1:0] mx_a [N];
  logic signed [D_W-1:0] mx_b, xmax_ext, lse;
  logic signed [D_W-1:0] d [N];

  for (genvar i = 0; i < N; i++) begin : g_ext
    assign mx_x[i] = D_W'(x_q[i]);
  end
  assign xmax_ext = D_W'(xmax);

  operand_mux #(.N(N), .W(D_W)) u_mux (
    .sel_pass2, .x(mx_x), .xp(mx_xp), .xmax(xmax_ext), .lse, .a(mx_a), .b(mx_b)
  );

  sub_module #(.N(N), .W(D_W)) u_sub (.clk, .a(mx_a), .b(mx_b), .d);

  // x'_i kept until the second pass
  logic [N*D_W-1:0] d_packed, d_packed_q;
  for (genvar i = 0; i < N; i++) begin : g_dpack
    assign d_packed[i*D_W +: D_W] = d[i];
    assign mx_xp[i] = d_packed_q[i*D_W +: D_W];
  end
  pipe_delay #(.W(N*D_W), .DEPTH(P2_OFF - 1)) u_xpreg (.clk, .d(d_packed), .q(d_packed_q));

  // ---- exponent modules (shared by both passes) ------------------------------
  logic [E_W-1:0] e [N];
  for (genvar i = 0; i < N; i++) begin : g_exp
    tqa_exp #(.D_W(D_W), .X_F(X_F)) u_exp (.clk, .x(d[i]), .y(e[i]));
  end
  assign out_y = e;

  // ---- adder tree, LOD, log module, concatenation -----------------------------
  logic [SUM_W-1:0]     sum;
  logic [K_W-1:0]       k, k_q;
  logic [TQA_OUT_F-1:0] m_frac, log_m;

  adder_tree #(.N(N), .IN_W(E_W)) u_tree (.clk, .e, .sum);
  lod_norm #(.SUM_W(SUM_W), .FRAC(TQA_OUT_F), .K_W(K_W)) u_lod (.sum, .k, .m_frac);
  tqa_log #(.IN_F(TQA_OUT_F)) u_log (.clk, .m_frac, .y(log_m));
  pipe_delay #(.W(K_W), .DEPTH(LAT_LOG)) u_kreg (.clk, .d(k), .q(k_q));

  // log2(sum) = {k, log2 m}, truncated to X_F fraction bits
  assign lse = D_W'({k_q, log_m[TQA_OUT_F-1 -: X_F]});
endmodule
