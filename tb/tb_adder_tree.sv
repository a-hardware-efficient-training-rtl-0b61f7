// tb_adder_tree: random (and all-ones) addends every cycle; checks the sum
// exactly clog2(N) = 3 cycles later against a sequential accumulation.
module tb_adder_tree;
  localparam int unsigned N = 8, IN_W = 25, LAT = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [IN_W-1:0] e [N];
  logic [IN_W+LAT-1:0] sum;
  longint unsigned hist [$];
  int checks = 0, failures = 0;

  adder_tree #(.N(N), .IN_W(IN_W)) dut (.clk, .e, .sum);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint unsigned s;
      @(negedge clk);
      if (t >= LAT) begin
        longint unsigned want;
        want = hist.pop_front();
        checks++;
        if (longint'(sum) != want) begin
          failures++;
          $display("FAIL t=%0d sum=%h expected=%h", t, sum, want);
        end
      end
      s = 0;
      for (int i = 0; i < N; i++) begin
        e[i] = (t % 5 == 0) ? '1 : IN_W'($urandom);
        s += longint'(e[i]);
      end
      hist.push_back(s);
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
