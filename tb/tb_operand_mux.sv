// tb_operand_mux: random operands with both select values; checks that the
// first pass gets (x_i, x_max) and the second pass (x'_i, log2(sum)).
module tb_operand_mux;
  localparam int unsigned N = 8, W = 28;
  logic sel_pass2;
  logic signed [W-1:0] x [N], xp [N], a [N];
  logic signed [W-1:0] xmax, lse, b;
  int checks = 0, failures = 0;

  operand_mux #(.N(N), .W(W)) dut (.sel_pass2, .x, .xp, .xmax, .lse, .a, .b);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      sel_pass2 = 1'(t % 3 == 0);
      for (int i = 0; i < N; i++) begin
        x[i]  = W'($urandom);
        xp[i] = W'($urandom);
      end
      xmax = W'($urandom);
      lse  = W'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (a[i] !== (sel_pass2 ? xp[i] : x[i])) begin
          failures++;
          $display("FAIL lane %0d sel=%0b", i, sel_pass2);
        end
      end
      checks++;
      if (b !== (sel_pass2 ? lse : xmax)) begin
        failures++;
        $display("FAIL b sel=%0b", sel_pass2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
