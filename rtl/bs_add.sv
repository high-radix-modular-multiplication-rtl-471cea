// bs_add: redundant (borrow-save) adder, X + Y -> Z, all three in signed-digit
// radix-2 form with a positive vector P and a negative vector N (value P - N).
//
// Two rows of full adders, no carry propagation along the word:
//   row 1 adds xp + yp - xn: a full adder on (xp, yp, ~xn) gives a positive
//          digit one position up (its carry) and a negative digit ~sum;
//   row 2 subtracts yn from that: a full adder on (~pos, neg, yn) gives a
//          negative digit one position up and a positive digit ~sum.
// This is the "4-to-2" redundant adder that accumulates S in the S-Scheme
// (the same block with yn = 0 is the 3-to-2 adder). The exact sum has W+2
// digits; bs_norm folds the top G+2 of them back into G digits, so the width
// stays W. Requires |X + Y| < 2^(W-1); the users size W for that.
// Combinational; the borrow-save encoding follows the source, the
// two-row structure and the top renormalisation are this design's choice.
module bs_add #(
  parameter int unsigned W = 16,
  parameter int unsigned G = 4
) (
  input  logic [W-1:0] xp,
  input  logic [W-1:0] xn,
  input  logic [W-1:0] yp,
  input  logic [W-1:0] yn,
  output logic [W-1:0] zp,
  output logic [W-1:0] zn
);
  logic [W-1:0] h1, l1;      // row 1 carry and sum
  logic [W:0]   h2, l2;      // row 2 carry and sum
  logic [W:0]   r1p, r1n;    // row 1 result, positive / negative digits
  logic [W+1:0] fp, fn;      // exact W+2 digit sum

  always_comb begin
    for (int j = 0; j < W; j++) begin
      {h1[j], l1[j]} = {1'b0, xp[j]} + {1'b0, yp[j]} + {1'b0, ~xn[j]};
    end
    r1p = {h1, 1'b0};
    r1n = {1'b0, ~l1};
    for (int j = 0; j <= W; j++) begin
      {h2[j], l2[j]} = {1'b0, ~r1p[j]} + {1'b0, r1n[j]} +
                       {1'b0, (j < W) ? yn[j] : 1'b0};
    end
    fp = {1'b0, ~l2};
    fn = {h2, 1'b0};
  end

  bs_norm #(.IW(W+2), .OW(W), .G(G)) u_norm (
    .ip(fp), .in_(fn), .op(zp), .on(zn)
  );

endmodule
