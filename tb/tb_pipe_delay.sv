// tb_pipe_delay: feeds random words every cycle into a 5-deep delay line and
// checks that each word appears at the output exactly 5 cycles later.
module tb_pipe_delay;
  localparam int unsigned W = 12, DEPTH = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  pipe_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk, .d, .q);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= DEPTH) begin
        logic [W-1:0] e;
        e = hist.pop_front();
        checks++;
        if (q !== e) begin
          failures++;
          $display("FAIL t=%0d q=%h expected=%h", t, q, e);
        end
      end
      d = W'($urandom);
      hist.push_back(d);
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
