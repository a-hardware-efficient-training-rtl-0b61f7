// lod_norm: leading-one detector and normaliser for the exponential sum.
//
// sum is unsigned with FRAC fraction bits and I_W = SUM_W - FRAC integer bits.
// k is the position of the leading one within the integer field, so that
// sum = m * 2^k with m in [1,2); m_frac is the fraction of m, i.e. the FRAC bits
// below the leading one (sum >> k, bits shifted out below are dropped).
// Combinational. A sum below 1 cannot occur for exact arithmetic (the largest
// element contributes 2^0); should rounding produce one, the output is clamped
// to k = 0, m = 1 (log2 = 0). That clamp and the truncation are this design's
// choice; the LOD itself and the shift come from the document.
//
// Only the fraction bits of the shifted sum are used; the bits above hold the
// leading one and are left unused on purpose.
//
// Interface: sum[SUM_W-1:0] -> k[K_W-1:0], m_frac[FRAC-1:0].
module lod_norm #(
  parameter int unsigned SUM_W = 28,
  parameter int unsigned FRAC  = 24,
  parameter int unsigned K_W   = $clog2(SUM_W - FRAC)
) (
  input  logic [SUM_W-1:0] sum,
  output logic [K_W-1:0]   k,
  output logic [FRAC-1:0]  m_frac
);
  localparam int unsigned I_W = SUM_W - FRAC;

  logic [I_W-1:0]   ipart;
  logic [SUM_W-1:0] shifted;

  assign ipart = sum[SUM_W-1:FRAC];

  always_comb begin
    k = '0;
    for (int i = 0; i < I_W; i++) begin
      if (ipart[i]) k = K_W'(i);
    end
    shifted = sum >> k;
    m_frac  = (ipart == '0) ? '0 : shifted[FRAC-1:0];
  end
endmodule
