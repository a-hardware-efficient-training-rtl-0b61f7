// tb_trunc_mult: checks the truncated multiplier against the algebraic identity
// p = (a*b - al*bl) >> DROP, where al and bl are the operands' LSB fields, for
// random and corner operands, and checks that the error against the exact
// product stays within the bound set by the omitted partial product.
module tb_trunc_mult;
  localparam int unsigned WA = 21, WB = 17, LA = 10, LB = 9, DROP = 17;
  logic [WA-1:0] a;
  logic [WB-1:0] b;
  logic [WA+WB-DROP-1:0] p;
  int checks = 0, failures = 0;

  trunc_mult #(.WA(WA), .WB(WB), .LA(LA), .LB(LB), .DROP(DROP)) dut (.a, .b, .p);

  task automatic check(input logic [WA-1:0] ta, input logic [WB-1:0] tb);
    longint unsigned full, omit, expv, err;
    a = ta; b = tb;
    #1;
    full = longint'(ta) * longint'(tb);
    omit = longint'(ta % (1 << LA)) * longint'(tb % (1 << LB));
    expv = (full - omit) >> DROP;
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h expected=%h", ta, tb, p, expv);
    end
    // error against the exact product, in output LSBs: at most the omitted
    // partial product (below 2^(LA+LB)) plus one LSB of truncation
    err = (full >> DROP) - longint'(p);
    checks++;
    if (err > ((64'd1 << (LA + LB)) >> DROP) + 1) begin
      failures++;
      $display("FAIL bound a=%h b=%h err=%0d", ta, tb, err);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check(WA'(1) << (WA-1), '1);
    for (int i = 0; i < 20000; i++) check(WA'($urandom), WB'($urandom));
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
