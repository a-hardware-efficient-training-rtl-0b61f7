// trunc_square: truncated squarer (combinational).
//
// The operand is split as M = H*2^L + Lo. The square H^2*2^(2L) + 2*H*Lo*2^L + Lo^2
// is formed without its last term, and the doubled cross term is a left shift of
// one product instead of a second multiplier. The result is truncated by DROP
// LSBs. The decomposition follows the TQA scheme's M1^2 optimisation; the split
// position L is this design's choice.
//
// The DROP low bits of the internal sum are discarded by design (the linter
// reports them as unused).
//
// Interface: m (W bits) -> p (2W-DROP bits), no clock.
module trunc_square #(
  parameter int unsigned W    = 16,
  parameter int unsigned L    = 8,
  parameter int unsigned DROP = 16
) (
  input  logic [W-1:0]        m,
  output logic [2*W-DROP-1:0] p
);
  localparam int unsigned PW = 2 * W;

  logic [W-L-1:0] h;
  logic [L-1:0]   lo;
  logic [PW-1:0]  full;

  assign {h, lo} = m;

  always_comb begin
    full = (PW'(h * h) << (2 * L)) + (PW'(h * lo) << (L + 1));
  end

  assign p = full[PW-1:DROP];
endmodule
