// tb_tqa_unit: drives the default (2^x, N0 = 4) quadratic unit with a new input
// every cycle and compares each result, 4 cycles later, with 2^x computed in
// floating point. The error limit, 2e-6, is the target precision of the unit
// with margin; the maximum and mean absolute errors are printed. Covers both
// segment ends and every segment.
module tb_tqa_unit;
  localparam int unsigned IN_F = 21, OUT_F = 24, LAT = 4;
  localparam real TOL = 2.0e-6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [IN_F-1:0] x;
  logic [OUT_F:0]  y;
  int checks = 0, failures = 0;
  real max_err = 0.0, sum_err = 0.0;

  tqa_unit dut (.clk, .x, .y);

  logic [IN_F-1:0] hist [$];

  initial begin
    int n;
    n = 0;
    x = '0;
    for (int i = 0; i < 40000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        real want, got, err;
        logic [IN_F-1:0] xi;
        xi   = hist.pop_front();
        want = 2.0 ** (real'(xi) / 2.0 ** IN_F);
        got  = real'(y) / 2.0 ** OUT_F;
        err  = (got > want) ? got - want : want - got;
        sum_err += err; n++;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y=%h want=%f err=%e", xi, y, want, err);
        end
      end
      if (i < 32)         x = IN_F'(i);                    // start of range
      else if (i < 64)    x = IN_F'((1 << IN_F) - (i - 31)); // end of range
      else if (i < 96)    x = IN_F'(((i - 64) >> 1) << (IN_F - 4)) - IN_F'(i & 1); // segment edges
      else                x = IN_F'($urandom);
      hist.push_back(x);
    end
    $display("tqa_unit 2^x: MACE=%e MAE=%e over %0d inputs", max_err, sum_err / n, n);
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
