// tb_sub_module: random signed operands every cycle; checks every lane's
// registered difference a_i - b one cycle later.
module tb_sub_module;
  localparam int unsigned N = 8, W = 28;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a [N], d [N];
  logic signed [W-1:0] b;
  logic signed [W-1:0] expd [N];
  int checks = 0, failures = 0;

  sub_module #(.N(N), .W(W)) dut (.clk, .a, .b, .d);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t > 0) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (d[i] !== expd[i]) begin
            failures++;
            $display("FAIL t=%0d lane %0d d=%0d expected=%0d", t, i, d[i], expd[i]);
          end
        end
      end
      b = W'(int'($urandom % (1 << 26)) - (1 << 25));
      for (int i = 0; i < N; i++) begin
        a[i] = W'(int'($urandom % (1 << 26)) - (1 << 25));
        expd[i] = W'(longint'(a[i]) - longint'(b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
