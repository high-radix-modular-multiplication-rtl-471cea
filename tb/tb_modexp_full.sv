// tb_modexp_full: the exponentiation engine at its default size (radix 2^6,
// 94 digits, i.e. 564-digit operands for moduli of up to 562 bits), driven
// through two complete operations with a random 561-bit odd modulus:
//   1. an RSA public-key style exponent e = 65537 (17 exponent bits), and
//   2. a random 561-bit exponent (private-key style, 561 bits scanned).
// m', r^2 mod m and the expected x^e mod m are computed in the testbench
// with wide integer arithmetic; the serial streams are collected and the
// value in [0, m) compared. The multiplication count (2*ebits + 2) and the
// clock count are checked as well. A third operation uses a 500-bit modulus
// with e = 65537.
module tb_modexp_full;
  localparam int K   = 6;
  localparam int N   = 94;
  localparam int KN  = K * N;
  localparam int EW  = KN;
  localparam int EBW = $clog2(EW + 1);
  localparam int MB  = 561;                // modulus bits
  typedef logic [2*KN+8:0] wide_t;

  logic clk = 0, rst_n = 0, start = 0;
  logic [KN-1:0]  x, m, r2;
  logic [EW-1:0]  e;
  logic [EBW-1:0] ebits;
  logic [K-1:0]   mprime;
  logic x_sel = 0, ser_in = 0;
  logic busy, ser_valid, ser_s, ser_sm, ser_last;
  logic [15:0] mm_count;
  int checks = 0, failures = 0;

  modexp dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wide_t rnd(input int bits);
    wide_t r = '0;
    for (int i = 0; i < ($bits(wide_t) + 31) / 32; i++) r = (r << 32) | wide_t'($urandom);
    return r & ((wide_t'(1) << bits) - 1);
  endfunction

  function automatic wide_t modpow(input wide_t b, input wide_t ex, input int nb, input wide_t mm);
    wide_t y = 1, z = b % mm;
    for (int i = 0; i < nb; i++) begin
      if (ex[i]) y = (y * z) % mm;
      z = (z * z) % mm;
    end
    return y;
  endfunction

  task automatic run(input wide_t mv, input wide_t xv, input wide_t ev, input int eb);
    wide_t refv, r2v;
    int    mp, cyc, nbits;
    logic [KN:0] bs, bsm;
    logic signed [KN+1:0] s_val;
    wide_t got;
    r2v = (wide_t'(1) << (2 * KN)) % mv;
    mp = -1;
    for (int c = 0; c < (1 << K); c++)
      if (((int'(mv[K-1:0]) * c) & ((1 << K) - 1)) == (1 << K) - 1) mp = c;
    refv = modpow(xv, ev, eb, mv);
    @(negedge clk);
    x = KN'(xv); m = KN'(mv); r2 = KN'(r2v); e = EW'(ev);
    ebits = EBW'(eb); mprime = K'(mp); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; nbits = 0;
    while (1) begin
      if (ser_valid) begin
        if (nbits <= KN) begin bs[nbits] = ser_s; bsm[nbits] = ser_sm; end
        nbits++;
        if (ser_last) break;
      end
      if (cyc > 2000000) break;
      @(negedge clk);
      cyc++;
    end
    s_val = $signed({bs[KN], bs});
    got   = s_val[KN+1] ? wide_t'(bsm) : wide_t'(bs);
    checks += 4;
    if (got != refv) begin failures++; $display("FAIL e bits %0d: result differs", eb); end
    if (nbits != KN + 1) begin failures++; $display("FAIL %0d serial bits", nbits); end
    if (int'(mm_count) != 2 * eb + 2) begin failures++; $display("FAIL %0d multiplications", mm_count); end
    if (cyc != (2 * eb + 2) * (3 * N + 6) + KN + 1) begin failures++; $display("FAIL %0d clocks", cyc); end
    $display("ebits %0d: %0d multiplications, %0d clocks, result %s",
             eb, mm_count, cyc, (got == refv) ? "ok" : "wrong");
  endtask

  initial begin
    wide_t mv, xv, ev;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    mv = rnd(MB) | (wide_t'(1) << (MB - 1)) | 1;
    xv = rnd(MB) % mv;
    run(mv, xv, 65537, 17);
    ev = rnd(MB) | (wide_t'(1) << (MB - 1));
    run(mv, xv, ev, MB);
    // a 500-bit modulus (the low end of the key lengths aimed at)
    mv = rnd(500) | (wide_t'(1) << 499) | 1;
    xv = rnd(500) % mv;
    run(mv, xv, 65537, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
