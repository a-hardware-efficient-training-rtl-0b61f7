// tb_cmp_max: applies a new random vector of signed values every cycle (wide,
// narrow, all-equal and one-dominant patterns) and checks x_max one cycle later
// against a linear scan of the vector.
module tb_cmp_max;
  localparam int unsigned N = 8, W = 26;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x [N];
  logic signed [W-1:0] xmax;
  int checks = 0, failures = 0;

  cmp_max #(.N(N), .W(W)) dut (.clk, .x, .xmax);

  logic signed [W-1:0] expq [$];

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic signed [W-1:0] m;
      @(negedge clk);
      if (t > 0) begin
        logic signed [W-1:0] e;
        e = expq.pop_front();
        checks++;
        if (xmax !== e) begin
          failures++;
          $display("FAIL t=%0d xmax=%0d expected=%0d", t, xmax, e);
        end
      end
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0: x[i] = W'($urandom);
          1: x[i] = W'(int'($urandom % 64) - 32);
          2: x[i] = W'(-5);
          default: x[i] = (i == t % N) ? W'(1000) : W'(-$urandom % 100000);
        endcase
      end
      m = x[0];
      for (int i = 1; i < N; i++) if (x[i] > m) m = x[i];
      expq.push_back(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
