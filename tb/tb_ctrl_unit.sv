// tb_ctrl_unit: random request pattern (bursts and gaps). Keeps its own list of
// acceptance cycles and checks every cycle that
//   * in_ready is low exactly when a vector was accepted P2_OFF cycles earlier,
//   * sel_pass2 is high exactly when one was accepted P2_OFF+1 cycles earlier,
//   * out_valid is high exactly LAT cycles after each acceptance,
//   * no second pass coincides with a first pass.
// Also counts stalls (request held off) and requires at least one.
module tb_ctrl_unit;
  localparam int unsigned P2_OFF = 12, LAT = 18, T_END = 4000;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, sel_pass2, out_valid;
  bit   acc [T_END + 64];
  int checks = 0, failures = 0, stalls = 0, accepted = 0, results = 0;

  ctrl_unit #(.P2_OFF(P2_OFF), .LAT(LAT)) dut (.clk, .rst_n, .in_valid, .in_ready, .sel_pass2, .out_valid);

  function automatic bit was_acc(int t);
    return (t >= 0) ? acc[t] : 1'b0;
  endfunction

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T_END; t++) begin
      // cycle t: inputs were set at the previous negedge, sample before posedge
      in_valid = ((t / 40) % 2 == 0) ? 1'b1 : 1'($urandom % 3 == 0);
      #1;
      checks++;
      if (in_ready !== !was_acc(t - P2_OFF)) begin
        failures++;
        $display("FAIL t=%0d in_ready=%0b", t, in_ready);
      end
      checks++;
      if (sel_pass2 !== was_acc(t - P2_OFF - 1)) begin
        failures++;
        $display("FAIL t=%0d sel_pass2=%0b", t, sel_pass2);
      end
      checks++;
      if (out_valid !== was_acc(t - LAT)) begin
        failures++;
        $display("FAIL t=%0d out_valid=%0b", t, out_valid);
      end
      checks++;
      if (was_acc(t - 1) && sel_pass2) begin
        failures++;
        $display("FAIL t=%0d both passes on the subtraction module", t);
      end
      acc[t] = in_valid && in_ready;
      if (acc[t]) accepted++;
      if (out_valid) results++;
      if (in_valid && !in_ready) stalls++;
      @(negedge clk);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no stall happened");
    end
    $display("accepted=%0d results=%0d stalls=%0d", accepted, results, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (T_END + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
