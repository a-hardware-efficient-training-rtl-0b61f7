// tb_trunc_square: checks the truncated squarer against the identity
// p = (m^2 - lo^2) >> DROP (lo = the L-bit LSB field of m) over random and
// corner operands, and the error against the exact square.
module tb_trunc_square;
  localparam int unsigned W = 16, L = 8, DROP = 16;
  logic [W-1:0] m;
  logic [2*W-DROP-1:0] p;
  int checks = 0, failures = 0;

  trunc_square #(.W(W), .L(L), .DROP(DROP)) dut (.m, .p);

  task automatic check(input logic [W-1:0] tm);
    longint unsigned full, omit, expv;
    m = tm;
    #1;
    full = longint'(tm) * longint'(tm);
    omit = longint'(tm % (1 << L)) ** 2;
    expv = (full - omit) >> DROP;
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL m=%h p=%h expected=%h", tm, p, expv);
    end
    checks++;
    if ((full >> DROP) - longint'(p) > 1) begin
      failures++;
      $display("FAIL bound m=%h", tm);
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(16'h00ff);
    check(16'hff00);
    for (int i = 0; i < 20000; i++) check(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
