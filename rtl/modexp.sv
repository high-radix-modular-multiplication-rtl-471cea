// modexp: modular exponentiation y = x^e mod m with the high-radix Montgomery
// multiplier (top of the design).
//
// The exponent is scanned from its least significant bit. Operands live in
// the Montgomery residue system [a] = a*r mod m, r = 2^(K*N), so that every
// product needs only the divisions by 2^K of mont_mul:
//   z := MM(x, r^2 mod m)              x into the residue system, [x]
//   y := MM(r^2 mod m, 1)              [1]
//   for i = 0 .. ebits-1:
//     y := MM(y, z), kept only if e_i = 1
//     z := MM(z, z), skipped after the last bit (its result is never used)
//   y := MM(y, 1)                      back to an ordinary residue, -m < y < m
// The product y*z is always computed and merely not written back when e_i =
// 0, so the running time does not depend on the bits of e. y and z stay in
// borrow-save form throughout; products feed the next multiplication
// directly. At the end y is converted by serial_conv, which streams the two's
// complement bits of y and of y + m, least significant first; the receiver
// keeps the one in [0, m). Meanwhile the next base can be shifted in on
// ser_in (one bit per valid output bit, least significant first, K*N bits);
// a later start with x_sel = 1 uses it instead of the parallel input x.
//
// The scan order, the constant-time inhibit, the conversions into and out of
// the residue system and the serial output with serial input of the next
// operand follow the source. Computing [1]
// with one extra multiplication, dropping the final squaring and running the
// y and z products one after the other on a single multiplier are this
// design's choices; the number of multiplications is 2*ebits + 2.
//
// Interface: pulse start while busy = 0; x, e, ebits, m, mprime and r2 are
// sampled then (x and r2 in [0, m), m odd, m < 2^(K*N-2), ebits >= 1).
// mprime is the low K bits of (-m)^-1 mod 2^(K*N). Each multiplication takes
// 3*N+5 clocks plus one issue clock; the serial output follows, K*N+1 bits
// with ser_valid high and ser_last on the sign bit; busy drops after it.
// Asynchronous active-low reset.
module modexp
  import mm_pkg::*;
#(
  parameter int unsigned K  = 6,
  parameter int unsigned N  = 94,
  parameter int unsigned EW = K * N,           // exponent register bits
  localparam int unsigned KN = K * N,
  localparam int unsigned EBW = $clog2(EW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KN-1:0]  x,
  input  logic [EW-1:0]  e,
  input  logic [EBW-1:0] ebits,
  input  logic [KN-1:0]  m,
  input  logic [K-1:0]   mprime,
  input  logic [KN-1:0]  r2,
  input  logic           x_sel,      // 1: take x from the serial input register
  input  logic           ser_in,     // next base, LSB first, while ser_valid
  output logic           busy,
  output logic [15:0]    mm_count,
  output logic           ser_valid,
  output logic           ser_s,
  output logic           ser_sm,
  output logic           ser_last
);
  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT, C_OUT} cstate_t;
  typedef enum logic [2:0] {OP_CONVZ, OP_CONVY, OP_MULY, OP_SQR, OP_FINAL} op_t;

  cstate_t         cstate;
  op_t             op;
  logic [KN-1:0]   y_p, y_n, z_p, z_n, m_r;
  logic [K-1:0]    mpr_r;
  logic [EW-1:0]   e_r;
  logic [EBW-1:0]  left;      // exponent bits still to scan, current included
  logic [KN-1:0]   xin_sh;    // base shifted in serially during the output

  // multiplier operands
  logic [KN-1:0]   a_p, a_n, b_p, b_n;
  always_comb begin
    unique case (op)
      OP_CONVZ: begin a_p = z_p; a_n = z_n; b_p = y_p; b_n = y_n; end  // x * r2
      OP_CONVY: begin a_p = y_p; a_n = y_n; b_p = KN'(1); b_n = '0; end // r2 * 1
      OP_MULY:  begin a_p = y_p; a_n = y_n; b_p = z_p; b_n = z_n; end
      OP_SQR:   begin a_p = z_p; a_n = z_n; b_p = z_p; b_n = z_n; end
      default:  begin a_p = y_p; a_n = y_n; b_p = KN'(1); b_n = '0; end // y * 1
    endcase
  end

  logic            mm_start, mm_busy, mm_done;
  logic [KN-1:0]   mm_p, mm_n;

  assign mm_start = (cstate == C_ISSUE);

  mont_mul #(.K(K), .N(N)) u_mm (
    .clk(clk), .rst_n(rst_n), .start(mm_start),
    .ap(a_p), .an(a_n), .bp(b_p), .bn(b_n), .m(m_r), .mprime(mpr_r),
    .busy(mm_busy), .done(mm_done), .sp(mm_p), .sn(mm_n)
  );

  logic            sc_load;
  assign sc_load = (cstate == C_WAIT) && mm_done && (op == OP_FINAL);

  serial_conv #(.NB(KN)) u_ser (
    .clk(clk), .rst_n(rst_n), .load(sc_load),
    .sp(mm_p), .sn(mm_n), .m(m_r),
    .valid(ser_valid), .s_bit(ser_s), .sm_bit(ser_sm), .last(ser_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate   <= C_IDLE;
      op       <= OP_CONVZ;
      y_p      <= '0;
      y_n      <= '0;
      z_p      <= '0;
      z_n      <= '0;
      m_r      <= '0;
      mpr_r    <= '0;
      e_r      <= '0;
      left     <= '0;
      mm_count <= '0;
      xin_sh   <= '0;
    end else begin
      // the next base enters bit-serially while the result leaves (K*N bits;
      // nothing is sampled with the final sign bit)
      if (ser_valid && !ser_last) xin_sh <= {ser_in, xin_sh[KN-1:1]};
      unique case (cstate)
        C_IDLE: if (start) begin
          z_p      <= x_sel ? xin_sh : x;  // z holds x, y r2, until converted
          z_n      <= '0;
          y_p      <= r2;
          y_n      <= '0;
          m_r      <= m;
          mpr_r    <= mprime;
          e_r      <= e;
          left     <= ebits;
          op       <= OP_CONVZ;
          mm_count <= '0;
          cstate   <= C_ISSUE;
        end
        C_ISSUE: begin
          mm_count <= mm_count + 1'b1;
          cstate   <= C_WAIT;
        end
        C_WAIT: if (mm_done) begin
          cstate <= C_ISSUE;
          unique case (op)
            OP_CONVZ: begin
              z_p <= mm_p; z_n <= mm_n;
              op  <= OP_CONVY;
            end
            OP_CONVY: begin
              y_p <= mm_p; y_n <= mm_n;
              op  <= OP_MULY;
            end
            OP_MULY: begin
              if (e_r[0]) begin      // otherwise the product is inhibited
                y_p <= mm_p; y_n <= mm_n;
              end
              e_r <= e_r >> 1;
              if (left == EBW'(1)) begin
                op <= OP_FINAL;
              end else begin
                op <= OP_SQR;
              end
              left <= left - 1'b1;
            end
            OP_SQR: begin
              z_p <= mm_p; z_n <= mm_n;
              op  <= OP_MULY;
            end
            default: begin           // OP_FINAL: result goes to serial_conv
              y_p    <= mm_p; y_n <= mm_n;
              cstate <= C_OUT;
            end
          endcase
        end
        C_OUT: if (ser_last) cstate <= C_IDLE;
        default: cstate <= C_IDLE;
      endcase
    end
  end

  assign busy = (cstate != C_IDLE);

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_busy)
    else $error("modexp: multiplication issued while one is running");

endmodule
