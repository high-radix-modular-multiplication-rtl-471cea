// r4_recode: recodes a borrow-save multiplier into minimally redundant radix-4
// digits {-2,-1,0,1,2} ("gen. multiplier digits b_i" of the S-Scheme).
//
// Pairs of signed binary digits give a maximally redundant radix-4 digit
// x_j = 2*(bp[2j+1]-bn[2j+1]) + (bp[2j]-bn[2j]) in {-3..3}. Each x_j is split
// as x_j = 4*t_(j+1) + w_j and the output digit is d_j = w_j + t_j. The
// transfer t_(j+1) depends only on x_j and its lower neighbour x_(j-1), so the
// carry propagation is limited to two digit positions:
//   x_j =  3           -> t =  1, w = -1
//   x_j = -3           -> t = -1, w =  1
//   x_j in {-1,0,1}    -> t =  0, w = x_j
//   x_j =  2           -> t =  0, w =  2 if x_(j-1) <= -2, else t = 1, w = -2
//   x_j = -2           -> t =  0, w = -2 if x_(j-1) >=  2, else t = -1, w = 2
// The rule for +-2 makes sure the incoming transfer never pushes d_j outside
// {-2..2}. The transfer out of the top position becomes one extra digit
// d[ND/2] in {-1,0,1}; groups of K/2 digits are the radix 2^K digits b_i.
// Combinational. Grouping digit pairs and converting to {-2..2} with limited
// carry propagation follows the source; the selection rule is this design's.
module r4_recode
  import mm_pkg::*;
#(
  parameter int unsigned ND = 564   // binary signed digits of B, even
) (
  input  logic [ND-1:0]   bp,
  input  logic [ND-1:0]   bn,
  output r4_t  [ND/2:0]   d
);
  localparam int unsigned NQ = ND / 2;

  logic signed [2:0] x [NQ];
  logic signed [1:0] t [NQ+1];   // t[j]: transfer into position j
  logic signed [2:0] w [NQ];

  always_comb begin
    for (int j = 0; j < NQ; j++) begin
      x[j] = 3'(2 * (int'(bp[2*j+1]) - int'(bn[2*j+1])) +
                (int'(bp[2*j]) - int'(bn[2*j])));
    end
    t[0] = 2'sd0;
    for (int j = 0; j < NQ; j++) begin
      logic signed [2:0] xl;
      xl = (j == 0) ? 3'sd0 : x[j > 0 ? j-1 : 0];
      case (x[j])
        3'sd3:  begin t[j+1] =  2'sd1; w[j] = -3'sd1; end
        -3'sd3: begin t[j+1] = -2'sd1; w[j] =  3'sd1; end
        3'sd2:  if (xl <= -3'sd2) begin t[j+1] = 2'sd0;  w[j] =  3'sd2; end
                else              begin t[j+1] = 2'sd1;  w[j] = -3'sd2; end
        -3'sd2: if (xl >= 3'sd2)  begin t[j+1] = 2'sd0;  w[j] = -3'sd2; end
                else              begin t[j+1] = -2'sd1; w[j] =  3'sd2; end
        default: begin t[j+1] = 2'sd0; w[j] = x[j]; end
      endcase
    end
    for (int j = 0; j < NQ; j++) begin
      d[j] = r4_from_int(int'(w[j]) + int'(t[j]));
    end
    d[NQ] = r4_from_int(int'(t[NQ]));
  end

endmodule
