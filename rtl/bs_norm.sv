// bs_norm: shortens a borrow-save (signed-digit radix-2) number to fewer digits.
//
// A carry-free signed-digit addition can leave non-zero digits above the
// width the value actually needs (for example 2^W - 2^(W-1) stands for 2^(W-1)).
// This block keeps the digits below position OW-G untouched, adds up the
// digits from position OW-G upwards with one short (IW-OW+G+1)-bit subtraction,
// and writes that small signed value back as G plain binary digits, either
// all positive or all negative. This is the only carry propagation used, and
// it spans just the top few digits.
//
// Precondition (guaranteed by the users of this block): the value V of the
// input satisfies |V| < 2^(OW-1). Then the top part T obeys |T| <= 2^(G-1)
// and fits into G digits, so the output has exactly the input's value.
// Purely combinational. The renormalisation itself is a choice of this
// design: the source only requires that borrow-save values keep a fixed width.
module bs_norm #(
  parameter int unsigned IW = 20,  // input digits
  parameter int unsigned OW = 18,  // output digits, OW <= IW
  parameter int unsigned G  = 4    // top output digits that are rewritten
) (
  input  logic [IW-1:0] ip,
  input  logic [IW-1:0] in_,
  output logic [OW-1:0] op,
  output logic [OW-1:0] on
);
  localparam int unsigned TW = IW - OW + G;  // digits folded into T

  logic signed [TW:0]   t;
  logic        [TW:0]   tmag;

  always_comb begin
    t    = $signed({1'b0, ip[IW-1 -: TW]}) - $signed({1'b0, in_[IW-1 -: TW]});
    tmag = t[TW] ? (TW+1)'(-t) : (TW+1)'(t);
    op   = ip[OW-1:0];
    on   = in_[OW-1:0];
    op[OW-1 -: G] = t[TW] ? '0 : tmag[G-1:0];
    on[OW-1 -: G] = t[TW] ? tmag[G-1:0] : '0;
  end

endmodule
