// tb_tqa_log: drives the log module with a new mantissa every cycle and
// compares each result, 4 cycles later, with log2(m) computed in floating
// point (limit 1.5e-6). Covers m = 1, m just below 2, every segment edge and
// random mantissas; prints the maximum and mean absolute errors.
module tb_tqa_log;
  localparam int unsigned IN_F = 24, OUT_F = 24, LAT = 4;
  localparam real TOL = 1.5e-6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [IN_F-1:0]  m_frac;
  logic [OUT_F-1:0] y;
  int checks = 0, failures = 0;
  real max_err = 0.0, sum_err = 0.0;

  tqa_log dut (.clk, .m_frac, .y);

  logic [IN_F-1:0] hist [$];

  initial begin
    int n;
    n = 0;
    m_frac = '0;
    for (int i = 0; i < 40000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        real want, got, err;
        logic [IN_F-1:0] mi;
        mi   = hist.pop_front();
        want = $ln(1.0 + real'(mi) / 2.0 ** IN_F) / $ln(2.0);
        got  = real'(y) / 2.0 ** OUT_F;
        err  = (got > want) ? got - want : want - got;
        sum_err += err; n++;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL m=%h y=%h want=%f err=%e", mi, y, want, err);
        end
      end
      if (i < 16)        m_frac = IN_F'(i);
      else if (i < 32)   m_frac = IN_F'((1 << IN_F) - (i - 15));
      else if (i < 96)   m_frac = IN_F'(((i - 32) >> 1) << (IN_F - 5)) - IN_F'(i & 1);
      else               m_frac = IN_F'($urandom);
      hist.push_back(m_frac);
    end
    $display("tqa_log: MACE=%e MAE=%e over %0d inputs", max_err, sum_err / n, n);
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
