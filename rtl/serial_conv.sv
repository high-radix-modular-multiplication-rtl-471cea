// serial_conv: final conversion of a borrow-save result into binary, bit-serial.
//
// After the last multiplication the result S (-m < S < m) is still in
// borrow-save form. Instead of a wide carry-propagate adder, S = P - N and m
// are shifted out least significant bit first through two serial adders:
//   adder 1: s_j  = p_j - n_j - borrow_j        (two's complement bits of S)
//   adder 2: sm_j = s_j + m_j + carry_j         (bits of S + m)
// Both bit streams leave the block; exactly one of S and S + m lies in
// [0, m), and the receiver picks that one (the sign of S is the last bit of
// the S stream). NB+1 bits are produced per stream, bit NB being the sign
// position. The two serial adders and the choice left to the environment
// follow the source; the framing (valid/last) is this design's.
//
// Timing: load in one clock (while idle or at any time, restarting); valid
// is high during the following NB+1 clocks, bit j in the j-th of them,
// last marks bit NB. One bit per clock. Asynchronous active-low reset.
module serial_conv #(
  parameter int unsigned NB = 564   // digits of S and bits of m
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [NB-1:0] sp,
  input  logic [NB-1:0] sn,
  input  logic [NB-1:0] m,
  output logic          valid,
  output logic          s_bit,
  output logic          sm_bit,
  output logic          last
);
  localparam int unsigned CW = $clog2(NB + 1);

  logic [NB-1:0] p_sh, n_sh, m_sh;
  logic          borrow, carry;
  logic [CW-1:0] cnt;
  logic          active;
  logic          b_next, c_next;

  always_comb begin
    // adder 1: p - n - borrow, one bit
    {b_next, s_bit} = {1'b0, p_sh[0]} - {1'b0, n_sh[0]} - {1'b0, borrow};
    // adder 2: s + m + carry, one bit
    {c_next, sm_bit} = {1'b0, s_bit} + {1'b0, m_sh[0]} + {1'b0, carry};
  end

  assign valid = active;
  assign last  = active && (cnt == CW'(NB));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_sh   <= '0;
      n_sh   <= '0;
      m_sh   <= '0;
      borrow <= 1'b0;
      carry  <= 1'b0;
      cnt    <= '0;
      active <= 1'b0;
    end else if (load) begin
      p_sh   <= sp;
      n_sh   <= sn;
      m_sh   <= m;
      borrow <= 1'b0;
      carry  <= 1'b0;
      cnt    <= '0;
      active <= 1'b1;
    end else if (active) begin
      p_sh   <= p_sh >> 1;
      n_sh   <= n_sh >> 1;
      m_sh   <= m_sh >> 1;
      borrow <= b_next;
      carry  <= c_next;
      cnt    <= cnt + 1'b1;
      if (cnt == CW'(NB)) active <= 1'b0;
    end
  end

endmodule
