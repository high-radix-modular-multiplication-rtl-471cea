// mont_mul: high-radix Montgomery modular multiplier, S-Scheme organisation.
//
// Computes S with S == A*B*2^(-K*N) (mod m) and -m < S < m, where A, B and S
// are borrow-save numbers of K*N digits with -m < A, B < m, and m is odd with
// m < 2^(K*N-2). The multiplier B is recoded into radix 2^K digits b_0..b_N
// (each K/2 radix-4 digits in {-2..2}); the loop runs for i = 0..N:
//   q_i = ((S mod 2^K) * m') mods 2^K
//   S   = (S + q_i*m) / 2^K + b_i*A,         A = A1 - A2.
// The division is exact because S + q_i*m is a multiple of 2^K.
//
// Every algorithm cycle takes three clocks. One rectangular multiplier
// (rect_mult) computes the three products one after the other into the
// latched register U, while one redundant adder (bs_add) adds the previous U
// into the accumulator S:
//   phase 0: U := -2^K*b_i*A2   S := S + U (= 2^K*b_i*A1)   q_i chosen from S
//   phase 1: U :=  q_i*m        S := S + U (= -2^K*b_i*A2)
//   phase 2: U :=  2^K*b_(i+1)*A1   S := (S + U (= q_i*m)) / 2^K
// The b_i*A products enter pre-multiplied by 2^K so that the single division
// can come last; adding multiples of 2^K leaves S mod 2^K unchanged, so q_i is
// chosen from S in phase 0, overlapped with a product, and used in phase 1.
// One extra clock (PRE) forms the first U. Products are ordered b_i*A1,
// -b_i*A2, q_i*m as in the S-Scheme; where the division by 2^K falls, and the
// pre-scaling, are this design's choices.
//
// Interface: pulse start for one clock while idle (busy = 0); A, B, m and m'
// are sampled then. done pulses 3*N+5 clocks after the start clock, i.e.
// 3*(N+1) clocks for the N+1 algorithm cycles plus one load and one PRE clock;
// sp/sn hold the result from then until the next start.
// The accumulator is W = (N+2)*K+4 digits wide; the result is renormalised to
// K*N digits on output. Asynchronous active-low reset.
module mont_mul
  import mm_pkg::*;
#(
  parameter int unsigned K = 6,    // radix 2^K, K even
  parameter int unsigned N = 94    // radix 2^K digits of the operands
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [K*N-1:0] ap,
  input  logic [K*N-1:0] an,
  input  logic [K*N-1:0] bp,
  input  logic [K*N-1:0] bn,
  input  logic [K*N-1:0] m,
  input  logic [K-1:0]   mprime,
  output logic           busy,
  output logic           done,
  output logic [K*N-1:0] sp,
  output logic [K*N-1:0] sn
);
  localparam int unsigned KN = K * N;
  localparam int unsigned P  = K / 2;           // radix-4 digits per b_i
  localparam int unsigned W  = (N + 2) * K + 4; // accumulator digits
  localparam int unsigned ND = (N + 1) * P;     // radix-4 digits of b_0..b_N
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_PH0, S_PH1, S_PH2} state_t;

  state_t          state;
  logic [IW-1:0]   iter;
  logic [KN-1:0]   a1_r, a2_r, m_r;
  logic [K-1:0]    mpr_r;
  r4_t  [ND-1:0]   bdig;
  r4_t  [P-1:0]    q_r;
  logic [W-1:0]    s_p, s_n;
  logic [W-1:0]    u_p, u_n;

  // multiplier digits of B
  r4_t  [KN/2:0]   b_rec;
  r4_t  [ND-1:0]   b_init;
  r4_recode #(.ND(KN)) u_rec (.bp(bp), .bn(bn), .d(b_rec));
  always_comb begin
    b_init = '0;
    b_init[KN/2:0] = b_rec;
  end

  // quotient digit from the K low digits of S
  logic [K-1:0]    q_bin;   // binary form, unused here (the digits are)
  r4_t  [P-1:0]    q_dig;
  qdigit_gen #(.K(K)) u_q (
    .s_p(s_p[K-1:0]), .s_n(s_n[K-1:0]), .mprime(mpr_r), .q(q_bin), .qd(q_dig)
  );

  // the rectangular multiplier and its operand selection
  r4_t  [P-1:0]    mul_d;
  logic [W-1:0]    mul_x;
  logic            mul_neg;
  logic [W-1:0]    mul_p, mul_n;

  always_comb begin
    mul_d   = bdig[P-1:0];
    mul_x   = W'({a1_r, K'(0)});
    mul_neg = 1'b0;
    unique case (state)
      S_PH0: begin mul_x = W'({a2_r, K'(0)}); mul_neg = 1'b1; end
      S_PH1: begin mul_d = q_r; mul_x = W'(m_r); end
      S_PH2: mul_d = bdig[2*P-1:P];
      default: ;
    endcase
  end

  rect_mult #(.W(W), .P(P)) u_mul (
    .d(mul_d), .x(mul_x), .neg(mul_neg), .up(mul_p), .un(mul_n)
  );

  // the accumulator adder S + U
  logic [W-1:0]    sum_p, sum_n;
  bs_add #(.W(W)) u_acc (
    .xp(s_p), .xn(s_n), .yp(u_p), .yn(u_n), .zp(sum_p), .zn(sum_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iter  <= '0;
      done  <= 1'b0;
      a1_r  <= '0;
      a2_r  <= '0;
      m_r   <= '0;
      mpr_r <= '0;
      bdig  <= '0;
      q_r   <= '0;
      s_p   <= '0;
      s_n   <= '0;
      u_p   <= '0;
      u_n   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a1_r  <= ap;
          a2_r  <= an;
          m_r   <= m;
          mpr_r <= mprime;
          bdig  <= b_init;
          s_p   <= '0;
          s_n   <= '0;
          iter  <= '0;
          state <= S_PRE;
        end
        S_PRE: begin
          u_p   <= mul_p;
          u_n   <= mul_n;
          state <= S_PH0;
        end
        S_PH0: begin
          q_r   <= q_dig;
          s_p   <= sum_p;
          s_n   <= sum_n;
          u_p   <= mul_p;
          u_n   <= mul_n;
          state <= S_PH1;
        end
        S_PH1: begin
          s_p   <= sum_p;
          s_n   <= sum_n;
          u_p   <= mul_p;
          u_n   <= mul_n;
          state <= S_PH2;
        end
        S_PH2: begin
          s_p   <= W'(sum_p >> K);
          s_n   <= W'(sum_n >> K);
          u_p   <= mul_p;
          u_n   <= mul_n;
          bdig  <= bdig >> ($bits(r4_t) * P);
          if (iter == IW'(N)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_PH0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // result, folded back to K*N digits (|S| < m < 2^(K*N-2))
  bs_norm #(.IW(W), .OW(KN), .G(4)) u_out (
    .ip(s_p), .in_(s_n), .op(sp), .on(sn)
  );

  // the K digits dropped by the division must be worth exactly zero
  a_exact_div: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_PH2 |-> sum_p[K-1:0] == sum_n[K-1:0])
    else $error("mont_mul: S + q*m not divisible by 2^K");
  // start is only honoured while idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == S_IDLE)
    else $error("mont_mul: start while busy");

endmodule
