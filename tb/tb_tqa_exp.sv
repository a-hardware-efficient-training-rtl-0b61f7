// tb_tqa_exp: drives the exponent module with a new non-positive input every
// cycle (integer parts from 0 down to -64, i.e. shifts inside and beyond the
// 25-bit result) and compares each output, 4 cycles later, with 2^x computed in
// floating point (absolute limit 2e-6). Counts the results flushed to zero by
// large shifts.
module tb_tqa_exp;
  localparam int unsigned D_W = 28, X_F = 21, OUT_F = 24, LAT = 4;
  localparam real TOL = 2.0e-6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [D_W-1:0] x;
  logic [OUT_F:0]        y;
  int checks = 0, failures = 0, flushed = 0;
  real max_err = 0.0;

  tqa_exp dut (.clk, .x, .y);

  logic signed [D_W-1:0] hist [$];

  initial begin
    x = '0;
    for (int i = 0; i < 30000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        real want, got, err;
        logic signed [D_W-1:0] xi;
        xi   = hist.pop_front();
        want = 2.0 ** (real'(xi) / 2.0 ** X_F);
        got  = real'(y) / 2.0 ** OUT_F;
        err  = (got > want) ? got - want : want - got;
        if (err > max_err) max_err = err;
        if (y == '0) flushed++;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%h want=%e err=%e", xi, y, want, err);
        end
      end
      if (i == 0)          x = '0;
      else if (i < 100)    x = -D_W'(i) <<< (X_F - 1);                 // -0.5 .. -49.5
      else if (i < 20000)  x = -D_W'($urandom % (32 << X_F));          // [-32, 0]
      else                 x = -D_W'($urandom % (64 << X_F) + 1);      // (-64, 0)
      hist.push_back(x);
    end
    checks++;
    if (flushed == 0) begin
      failures++;
      $display("FAIL no result was flushed to zero");
    end
    $display("tqa_exp: MACE=%e, %0d results flushed to zero", max_err, flushed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
