// trunc_mult: truncated unsigned multiplier (combinational).
//
// Each operand is split into an MSB part and an LSB part, A = Ah*2^LA + Al and
// B = Bh*2^LB + Bl. Of the four partial products only Ah*Bh, Ah*Bl and Al*Bh are
// generated; Al*Bl lies wholly below the bits that are kept and is never built.
// The sum of the three is then truncated by DROP LSBs. With LA + LB <= DROP the
// error is below one output LSB plus the truncation itself.
// The split into three partial products follows the truncated multiplier of the
// TQA scheme; the split positions LA/LB are this design's choice (checked
// against the accuracy target with a bit-exact model).
//
// The DROP low bits of the internal sum are discarded by design (the linter
// reports them as unused).
//
// Interface: a (WA bits), b (WB bits) -> p (WA+WB-DROP bits), no clock.
module trunc_mult #(
  parameter int unsigned WA   = 16,
  parameter int unsigned WB   = 16,
  parameter int unsigned LA   = 8,
  parameter int unsigned LB   = 8,
  parameter int unsigned DROP = 16
) (
  input  logic [WA-1:0]      a,
  input  logic [WB-1:0]      b,
  output logic [WA+WB-DROP-1:0] p
);
  localparam int unsigned PW = WA + WB;

  logic [WA-LA-1:0] ah;
  logic [LA-1:0]    al;
  logic [WB-LB-1:0] bh;
  logic [LB-1:0]    bl;
  logic [PW-1:0]    hh, hl, lh, full;

  assign {ah, al} = a;
  assign {bh, bl} = b;

  always_comb begin
    hh   = PW'(ah * bh) << (LA + LB);
    hl   = PW'(ah * bl) << LA;
    lh   = PW'(al * bh) << LB;
    full = hh + hl + lh;
  end

  assign p = full[PW-1:DROP];
endmodule
