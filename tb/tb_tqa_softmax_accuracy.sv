// tb_tqa_softmax_accuracy: numerical accuracy of the softmax over three input
// ranges, [-1,1], [-5,5] and [-10,10]. For each range it streams NVEC random
// 8-element vectors (inputs uniform over the range, quantised to 21 fraction
// bits) back to back through the handshake and compares every output with the
// floating-point base-2 softmax. It prints the maximum (MACE) and mean (MAE)
// absolute error per range and fails if any output is off by more than 5e-6
// or a range's MAE exceeds 5e-7.
module tb_tqa_softmax_accuracy;
  localparam int unsigned N = 8, X_I = 4, X_F = 21, X_W = X_I + X_F + 1, OUT_F = 24;
  localparam int unsigned NVEC = 100000;   // 800,000 inputs per range
  localparam real TOL = 5.0e-6, TOL_MAE = 5.0e-7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n, in_valid, in_ready, out_valid;
  logic signed [X_W-1:0] in_x  [N];
  logic        [OUT_F:0] out_y [N];

  tqa_softmax dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .out_valid, .out_y);

  typedef logic [N-1:0][X_W-1:0] vec_t;  // lane i in vec_t[i]
  vec_t sb [$];
  int   checks = 0, failures = 0, received = 0;
  real  max_err, sum_err;
  int   n_err;

  function automatic logic signed [X_W-1:0] rnd(int r);
    longint span;
    span = longint'(r) << X_F;
    return X_W'(longint'($urandom) % (2 * span + 1) - span);
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      vec_t v;
      real  xm, s, want, got, err;
      v = sb.pop_front();
      received++;
      xm = -1.0e9;
      for (int i = 0; i < N; i++) if (real'(signed'(v[i])) > xm) xm = real'(signed'(v[i]));
      s = 0.0;
      for (int i = 0; i < N; i++) s += 2.0 ** ((real'(signed'(v[i])) - xm) / 2.0 ** X_F);
      for (int i = 0; i < N; i++) begin
        want = 2.0 ** ((real'(signed'(v[i])) - xm) / 2.0 ** X_F) / s;
        got  = real'(out_y[i]) / 2.0 ** OUT_F;
        err  = (got > want) ? got - want : want - got;
        if (err > max_err) max_err = err;
        sum_err += err;
        n_err++;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL got %e want %e", got, want);
        end
      end
    end
  end

  task automatic run_range(int r);
    int sent;
    max_err = 0.0; sum_err = 0.0; n_err = 0; received = 0; sent = 0;
    for (int i = 0; i < N; i++) in_x[i] = rnd(r);
    in_valid = 1'b1;
    while (sent < NVEC) begin
      #4;  // just before the rising edge
      if (in_ready) begin
        vec_t pv;
        for (int i = 0; i < N; i++) pv[i] = in_x[i];
        sb.push_back(pv);
        sent++;
        @(negedge clk);
        for (int i = 0; i < N; i++) in_x[i] = rnd(r);
      end else begin
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    wait (sb.size() == 0);
    @(negedge clk);
    checks++;
    if (sum_err / n_err > TOL_MAE) begin
      failures++;
      $display("FAIL MAE over range");
    end
    $display("range [-%0d,%0d]: %0d inputs MACE=%e MAE=%e", r, r, n_err, max_err, sum_err / n_err);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) in_x[i] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    run_range(1);
    run_range(5);
    run_range(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3 * NVEC * 3 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
