// tb_tqa_softmax: end-to-end test of the softmax at its default size (8 lanes,
// 4.21 inputs).
//
// Streams vectors of several kinds (random in +-1, +-5, +-10, full +-16 range,
// all-equal, one dominant element, extreme spread) through the handshake, with
// single vectors, back-to-back bursts and random gaps. A scoreboard keeps each
// accepted vector and its acceptance cycle; every result must arrive exactly
// 18 cycles later and each lane must be within 1e-5 of the floating-point
// base-2 softmax 2^(x_i - x_max) / sum_j 2^(x_j - x_max).
// It also counts how often each mechanism of the design happened and fails if
// one never did: input stall (shared modules busy), second pass through the
// shared subtraction/exponent modules (every result is one), each leading-one
// position k = 0..3 of the exponential sum (classified from the exact sum of
// vectors whose result passed), and results flushed to zero by a shift beyond
// the result width. Only the top's ports are observed.
module tb_tqa_softmax;
  localparam int unsigned N = 8, X_I = 4, X_F = 21, X_W = X_I + X_F + 1, OUT_F = 24;
  localparam int unsigned LAT = 18, NVEC = 3000;
  localparam real TOL = 1.0e-5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n, in_valid, in_ready, out_valid;
  logic signed [X_W-1:0] in_x  [N];
  logic        [OUT_F:0] out_y [N];

  tqa_softmax dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .out_valid, .out_y);

  typedef struct {
    logic signed [X_W-1:0] x [N];
    longint                t;
  } vec_t;

  vec_t   sb [$];
  longint cyc = 0;
  int     checks = 0, failures = 0, sent = 0, received = 0;
  int     n_stall = 0, n_pass2 = 0, n_flush = 0;
  int     n_k [4];
  real    max_err = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters, sampled just before each rising edge
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
    end
  end

  function automatic logic signed [X_W-1:0] rnd(real r);
    longint span;
    span = longint'(r * 2.0 ** X_F);
    return X_W'(longint'($urandom) % (2 * span + 1) - span);
  endfunction

  task automatic make_vec(int kind);
    case (kind % 8)
      0: for (int i = 0; i < N; i++) in_x[i] = rnd(1.0);
      1: for (int i = 0; i < N; i++) in_x[i] = rnd(5.0);
      2: for (int i = 0; i < N; i++) in_x[i] = rnd(10.0);
      3: for (int i = 0; i < N; i++) in_x[i] = X_W'($urandom);        // full range
      4: begin                                                     // all equal: sum = 8
        logic signed [X_W-1:0] v;
        v = rnd(15.0);
        for (int i = 0; i < N; i++) in_x[i] = v;
      end
      5: begin                                                     // one dominant
        for (int i = 0; i < N; i++) in_x[i] = rnd(2.0) - X_W'(8 << X_F);
        in_x[$urandom % N] = X_W'(7 << X_F);
      end
      6: begin                                                     // two equal maxima
        for (int i = 0; i < N; i++) in_x[i] = rnd(1.0) - X_W'(4 << X_F);
        in_x[0] = X_W'(3 << X_F);
        in_x[5] = X_W'(3 << X_F);
      end
      default: begin                                               // extreme spread
        for (int i = 0; i < N; i++) in_x[i] = rnd(15.9);
        in_x[1] = X_W'((16 << X_F) - 1);
        in_x[2] = -X_W'(16 << X_F);
      end
    endcase
  endtask

  // driver
  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) in_x[i] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NVEC) begin
      bit want;
      if (sent < 4)               want = (cyc % 30 == 0);         // isolated vectors
      else if ((sent / 200) % 2)  want = 1'b1;                    // bursts
      else                        want = ($urandom % 3 != 0);     // random gaps
      if (!in_valid || in_ready) begin                            // new vector only after acceptance
        in_valid = want;
        if (want) make_vec(sent);
      end
      #4;
      if (in_valid && in_ready) begin
        vec_t v;
        v.x = in_x;
        v.t = cyc;
        sb.push_back(v);
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (received != sent || sb.size() != 0) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, received);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no input stall happened"); end
    checks++;
    if (n_pass2 == 0) begin failures++; $display("FAIL no second pass happened"); end
    checks++;
    if (n_flush == 0) begin failures++; $display("FAIL no result was flushed to zero"); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_k[i] == 0) begin failures++; $display("FAIL leading-one position k=%0d never seen", i); end
    end
    $display("vectors=%0d MACE=%e stalls=%0d second_passes=%0d flushed=%0d k0..3=%0d/%0d/%0d/%0d",
             received, max_err, n_stall, n_pass2, n_flush, n_k[0], n_k[1], n_k[2], n_k[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      vec_t v;
      real  xm, s, want, got, err;
      received++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL result without a request");
      end else begin
        v = sb.pop_front();
        checks++;
        if (cyc - v.t != LAT) begin
          failures++;
          $display("FAIL latency %0d", cyc - v.t);
        end
        xm = -1.0e9;
        for (int i = 0; i < N; i++) if (real'(v.x[i]) > xm) xm = real'(v.x[i]);
        s = 0.0;
        for (int i = 0; i < N; i++) s += 2.0 ** ((real'(v.x[i]) - xm) / 2.0 ** X_F);
        n_pass2++;
        n_k[(s >= 8.0) ? 3 : (s >= 4.0) ? 2 : (s >= 2.0) ? 1 : 0]++;
        for (int i = 0; i < N; i++) begin
          want = 2.0 ** ((real'(v.x[i]) - xm) / 2.0 ** X_F) / s;
          got  = real'(out_y[i]) / 2.0 ** OUT_F;
          err  = (got > want) ? got - want : want - got;
          if (err > max_err) max_err = err;
          if (out_y[i] == '0 && want > 0.0) n_flush++;
          checks++;
          if (err > TOL) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d got %f want %f", i, got, want);
          end
        end
      end
    end
  end

  initial begin : watchdog
    repeat (NVEC * 40 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
