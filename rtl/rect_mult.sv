// rect_mult: rectangular aspect-ratio multiplier, U = (-1)^neg * d * x.
//
// The multiplier digit d is a radix 2^K digit given as P = K/2 radix-4 digits
// a_j in {-2..2}, d = sum a_j*4^j. Every a_j selects 0, x or 2x (a shift), the
// result is shifted by 2j places and, depending on the sign of a_j xor neg,
// placed in the positive or the negative vector of a borrow-save partial
// product. The P partial products are summed by P-1 redundant adders (bs_add)
// in a chain, so no carry propagates along the word. For K = 6 this is the
// "shifts and two adds" structure of the source; the chain (rather than a
// balanced tree for larger P) is this design's choice.
//
// x is a plain binary operand already placed at its bit position by the user;
// W must be large enough that |U| < 2^(W-1) and every shifted partial product
// fits in W bits. Combinational; in the S-Scheme its output is latched in U.
module rect_mult
  import mm_pkg::*;
#(
  parameter int unsigned W = 580,
  parameter int unsigned P = 3
) (
  input  r4_t  [P-1:0] d,
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] up,
  output logic [W-1:0] un
);
  logic [W-1:0] ppp [P];   // partial products, positive vectors
  logic [W-1:0] ppn [P];   // partial products, negative vectors
  logic [W-1:0] ap  [P];   // running sums
  logic [W-1:0] an  [P];

  always_comb begin
    for (int j = 0; j < P; j++) begin
      logic [W-1:0] mult;
      unique case (d[j].mag)
        2'd1:    mult = x << (2*j);
        2'd2:    mult = x << (2*j + 1);
        default: mult = '0;
      endcase
      ppp[j] = (d[j].neg ^ neg) ? '0   : mult;
      ppn[j] = (d[j].neg ^ neg) ? mult : '0;
    end
  end

  assign ap[0] = ppp[0];
  assign an[0] = ppn[0];

  for (genvar j = 1; j < P; j++) begin : g_add
    bs_add #(.W(W)) u_add (
      .xp(ap[j-1]), .xn(an[j-1]), .yp(ppp[j]), .yn(ppn[j]),
      .zp(ap[j]),   .zn(an[j])
    );
  end

  assign up = ap[P-1];
  assign un = an[P-1];

endmodule
