// tb_lod_norm: random sums in [1, 16) and the clamp case (sum < 1). Checks that
// k = floor(log2(sum)) computed in floating point, and that m_frac satisfies
// (1 + m_frac/2^24) * 2^k <= sum < (1 + (m_frac+1)/2^24) * 2^k.
module tb_lod_norm;
  localparam int unsigned SUM_W = 28, FRAC = 24, K_W = 2;
  logic [SUM_W-1:0] sum;
  logic [K_W-1:0]   k;
  logic [FRAC-1:0]  m_frac;
  int checks = 0, failures = 0;
  int seen_k [4];

  lod_norm #(.SUM_W(SUM_W), .FRAC(FRAC), .K_W(K_W)) dut (.sum, .k, .m_frac);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      real s, lo, hi;
      int kw;
      case (t % 7)
        0:       sum = SUM_W'(1) << FRAC;                        // exactly 1
        1:       sum = SUM_W'($urandom % (1 << FRAC));           // below 1: clamp
        2:       sum = '1;                                       // largest
        default: sum = (SUM_W'(1) << FRAC) + SUM_W'($urandom % (15 << FRAC));
      endcase
      #1;
      s = real'(sum) / 2.0 ** FRAC;
      if (s < 1.0) begin
        checks++;
        if (k != 0 || m_frac != 0) begin
          failures++;
          $display("FAIL clamp sum=%h k=%0d m=%h", sum, k, m_frac);
        end
        continue;
      end
      kw = $floor($ln(s) / $ln(2.0) + 1e-12);
      seen_k[kw]++;
      checks++;
      if (k != K_W'(kw)) begin
        failures++;
        $display("FAIL sum=%h k=%0d expected=%0d", sum, k, kw);
      end
      lo = (1.0 + real'(m_frac) / 2.0 ** FRAC) * 2.0 ** kw;
      hi = (1.0 + (real'(m_frac) + 1.0) / 2.0 ** FRAC) * 2.0 ** kw;
      checks++;
      if (!(lo <= s && s < hi)) begin
        failures++;
        $display("FAIL sum=%h m=%h", sum, m_frac);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen_k[i] == 0) begin
        failures++;
        $display("FAIL k=%0d never produced", i);
      end
    end
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
