// tb_modexp: end-to-end test of the modular exponentiation engine at a
// reduced size (K = 6, N = 6: 36-digit operands, moduli below 2^34).
// For random odd m, base x < m, exponent e and scan length ebits, the engine
// is started with m' and r^2 mod m worked out here; the two serial output
// streams (y and y + m) are collected, the one in [0, m) is taken and
// compared with x^e mod m computed by square-and-multiply in the testbench.
// Also checked: the streams differ by exactly m, 2*ebits+2 multiplications
// are issued, and the run time depends only on ebits (constant time):
// (2*ebits+2)*(3*N+6) + K*N + 1 clocks from start to the last serial bit.
// Counted mechanisms, each of which must occur: inhibited y*z products
// (e_i = 0), written y*z products, negative results (y + m chosen),
// non-negative results, negative quotient digits, negative multiplier digits,
// and bases loaded serially: for odd-numbered runs the base is shifted in on
// ser_in during the previous run's output and selected with x_sel, while the
// parallel x input carries a wrong value.
module tb_modexp;
  localparam int K  = 6;
  localparam int N  = 6;
  localparam int KN = K * N;
  localparam int EW = KN;
  localparam int EBW = $clog2(EW + 1);
  typedef logic signed [255:0] big_t;

  logic clk = 0, rst_n = 0, start = 0;
  logic [KN-1:0]  x, m, r2;
  logic [EW-1:0]  e;
  logic [EBW-1:0] ebits;
  logic [K-1:0]   mprime;
  logic x_sel = 0, ser_in = 0;
  logic busy, ser_valid, ser_s, ser_sm, ser_last;
  logic [15:0] mm_count;
  int checks = 0, failures = 0;
  int n_serx = 0;
  int n_inhibit = 0, n_write = 0, n_neg = 0, n_pos = 0, n_negq = 0, n_negb = 0;

  modexp #(.K(K), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed inside the engine
  always @(posedge clk) if (rst_n) begin
    if (dut.cstate == 2'd2 && dut.mm_done && dut.op == 3'd2) begin
      if (dut.e_r[0]) n_write++; else n_inhibit++;
    end
    if (dut.u_mm.state == 3'd2 && dut.u_mm.q_dig[K/2-1].neg) n_negq++;
    if (dut.u_mm.state == 3'd2 && dut.u_mm.bdig[0].neg) n_negb++;
  end

  function automatic big_t rnd(input int bits);
    big_t r = '0;
    for (int i = 0; i < 8; i++) r = (r << 32) | big_t'($urandom);
    return r & ((big_t'(1) <<< bits) - 1);
  endfunction

  function automatic big_t modpow(input big_t b, input big_t ex, input int nb, input big_t mm);
    big_t y = 1 % mm, z = b % mm;
    for (int i = 0; i < nb; i++) begin
      if (ex[i]) y = (y * z) % mm;
      z = (z * z) % mm;
    end
    return y;
  endfunction

  localparam int RUNS = 60;
  big_t m_all [RUNS];
  big_t x_all [RUNS];

  initial begin
    for (int t = 0; t < RUNS; t++) begin
      m_all[t] = rnd($urandom_range(8, KN - 2)) | 1;
      if (t == 0) m_all[t] = (big_t'(1) <<< (KN - 2)) - 1;
      x_all[t] = rnd(KN) % m_all[t];
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < RUNS; t++) begin
      big_t mv, xv, ev, refv, r2v, got_s, got_sm, got, xnext;
      int   mp, eb, cyc, nbits;
      logic [KN:0] bs, bsm;
      logic serial_x;
      mv = m_all[t];
      xv = x_all[t];
      serial_x = (t % 2 == 1);
      xnext = (t + 1 < RUNS) ? x_all[t + 1] : '0;
      eb = $urandom_range(1, EW);
      if (t < 3) eb = EW;
      ev = rnd(eb);
      if (t == 1) ev = (big_t'(1) <<< eb) - 1;
      if (t == 2) ev = 0;
      r2v = (big_t'(1) <<< (2 * KN)) % mv;
      mp = -1;
      for (int c = 0; c < (1 << K); c++)
        if (((int'(mv[K-1:0]) * c) & ((1 << K) - 1)) == (1 << K) - 1) mp = c;
      refv = modpow(xv, ev, eb, mv);
      @(negedge clk);
      x = serial_x ? KN'(xv + 1) : KN'(xv); x_sel = serial_x;
      if (serial_x) n_serx++;
      m = KN'(mv); r2 = KN'(r2v); e = EW'(ev);
      ebits = EBW'(eb); mprime = K'(mp); start = 1;
      @(negedge clk);
      start = 0;
      x_sel = 0;
      cyc = 1; nbits = 0;
      while (1) begin
        if (ser_valid) begin
          ser_in = (nbits < KN) ? xnext[nbits] : 1'b0;
          if (nbits <= KN) begin bs[nbits] = ser_s; bsm[nbits] = ser_sm; end
          nbits++;
          if (ser_last) break;
        end
        if (cyc > 100000) break;
        @(negedge clk);
        cyc++;
      end
      got_s  = big_t'($signed(bs));
      got_sm = big_t'({1'b0, bsm});
      got    = (got_s < 0) ? got_sm : got_s;
      if (got_s < 0) n_neg++; else n_pos++;
      checks += 5;
      if (got != refv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d m=%0d x=%0d e=%0d/%0d: got %0d expected %0d",
                                    t, mv, xv, ev, eb, got, refv);
      end
      if (got_sm - got_s != mv) begin failures++; $display("FAIL t=%0d streams differ by %0d", t, got_sm - got_s); end
      if (nbits != KN + 1) begin failures++; $display("FAIL t=%0d %0d serial bits", t, nbits); end
      if (int'(mm_count) != 2 * eb + 2) begin
        failures++; $display("FAIL t=%0d %0d multiplications, expected %0d", t, mm_count, 2 * eb + 2);
      end
      if (cyc != (2 * eb + 2) * (3 * N + 6) + KN + 1) begin
        failures++; $display("FAIL t=%0d run time %0d clocks, expected %0d", t, cyc, (2 * eb + 2) * (3 * N + 6) + KN + 1);
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL t=%0d still busy", t); end
    end
    $display("inhibited %0d, written %0d, negative %0d, non-negative %0d, q<0 %0d, b<0 %0d",
             n_inhibit, n_write, n_neg, n_pos, n_negq, n_negb);
    checks += 7;
    if (n_serx == 0)    begin failures++; $display("FAIL no serially loaded base"); end
    if (n_inhibit == 0) begin failures++; $display("FAIL no inhibited product"); end
    if (n_write == 0)   begin failures++; $display("FAIL no written product"); end
    if (n_neg == 0)     begin failures++; $display("FAIL no negative result"); end
    if (n_pos == 0)     begin failures++; $display("FAIL no non-negative result"); end
    if (n_negq == 0)    begin failures++; $display("FAIL no negative quotient digit"); end
    if (n_negb == 0)    begin failures++; $display("FAIL no negative multiplier digit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
