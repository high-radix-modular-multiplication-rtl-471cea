// qdigit_gen: Montgomery quotient digit selection,
//   q = ((S mod 2^K) * m') mods 2^K,  -2^(K-1) <= q < 2^(K-1),
// where "mods" is the symmetric residue. Only the K least significant
// borrow-save digits of S and the K least significant bits of m' are used:
// one K-bit subtraction turns the low digits into S mod 2^K, a K-by-K
// multiplication keeps the low K bits of the product, and reading those bits
// as two's complement gives the symmetric residue. With m' = (-m)^-1 mod 2^K,
// S + q*m is a multiple of 2^K.
//
// The digit is also given as K/2 radix-4 digits in {-2..2} (Booth recoding
// of the two's complement value: a_j = -2*q[2j+1] + q[2j] + q[2j-1]), the form
// the rectangular multiplier consumes. Combinational.
// The selection rule is the source's; computing it with a small multiplier
// instead of a 2^K-entry look-up table is this design's choice (the same
// values; a table loaded per modulus would need a fill sequence).
module qdigit_gen
  import mm_pkg::*;
#(
  parameter int unsigned K = 6    // radix 2^K, K even
) (
  input  logic [K-1:0]   s_p,
  input  logic [K-1:0]   s_n,
  input  logic [K-1:0]   mprime,
  output logic [K-1:0]   q,
  output r4_t  [K/2-1:0] qd
);
  logic [K-1:0] s_low;
  logic [K:0]   qe;   // q with a zero below bit 0 for the Booth window

  always_comb begin
    s_low = s_p - s_n;
    q     = K'(s_low * mprime);
    qe    = {q, 1'b0};
    for (int j = 0; j < K/2; j++) begin
      qd[j] = r4_from_int(-2 * int'(qe[2*j+2]) + int'(qe[2*j+1]) + int'(qe[2*j]));
    end
  end

endmodule
