// mont_mul_check: drives one mont_mul instance of radix 2^K and N digits
// through TRIALS multiplications and reports its counts. Random odd moduli m < 2^(K*N-2), random
// multiplicand and multiplier values in (-m, m), given as borrow-save vectors
// with random digit patterns; also the extreme values +-(m-1). The result
// must satisfy S*2^(K*N) == A*B (mod m) and -m < S < m, and done must come
// exactly 3*N+5 clocks after start (N+1 algorithm cycles of 3 clocks, plus
// one load and one first-product clock).
module mont_mul_check #(
  parameter int K      = 6,
  parameter int N      = 10,
  parameter int TRIALS = 400
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int KN = K * N;
  typedef logic signed [255:0] big_t;

  logic rst_n = 0, start = 0;
  logic [KN-1:0] ap, an, bp, bn, m, sp, sn;
  logic [K-1:0]  mprime;
  logic busy, done;
  int neg_res = 0;

  mont_mul #(.K(K), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ap(ap), .an(an), .bp(bp), .bn(bn),
    .m(m), .mprime(mprime), .busy(busy), .done(done), .sp(sp), .sn(sn)
  );

  function automatic big_t rnd(input int bits);
    big_t r = '0;
    for (int i = 0; i < 8; i++) r = (r << 32) | big_t'($urandom);
    return r & ((big_t'(1) <<< bits) - 1);
  endfunction

  // borrow-save vector pair (p, n) of KN digits with value v, |v| < 2^(KN-2)
  task automatic make_bs(input big_t v, output logic [KN-1:0] p, output logic [KN-1:0] n);
    big_t pv, nv;
    do begin
      pv = rnd(KN);
      if ($urandom_range(0, 3) == 0) pv = pv >>> $urandom_range(0, KN);
      nv = pv - v;
    end while (nv < 0 || nv >= (big_t'(1) <<< KN));
    p = KN'(pv);
    n = KN'(nv);
  endtask

  function automatic big_t modp(input big_t a, input big_t mm);
    big_t r = a % mm;
    if (r < 0) r += mm;
    return r;
  endfunction

  initial begin
    finished = 0;
    checks   = 0;
    failures = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < TRIALS; t++) begin
      big_t mv, av, bv, sv, lhs, rhs;
      int   mp, lat;
      mv = rnd($urandom_range(4, KN - 2)) | 1;
      if (mv < 3) mv = 3;
      if (t < 4) mv = (big_t'(1) <<< (KN - 2)) - 1;
      av = modp(rnd(KN), mv);
      bv = modp(rnd(KN), mv);
      if ($urandom_range(0, 1)) av = -av;
      if ($urandom_range(0, 1)) bv = -bv;
      if (t % 4 == 1) begin av = mv - 1; bv = -(mv - 1); end
      if (t % 4 == 2) begin av = -(mv - 1); bv = -(mv - 1); end
      mp = -1;
      for (int c = 0; c < (1 << K); c++)
        if (((int'(mv[K-1:0]) * c) & ((1 << K) - 1)) == (1 << K) - 1) mp = c;
      @(negedge clk);
      make_bs(av, ap, an);
      make_bs(bv, bp, bn);
      m = KN'(mv); mprime = K'(mp); start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 10 * N) begin
        @(negedge clk);
        lat++;
      end
      sv  = big_t'({1'b0, sp}) - big_t'({1'b0, sn});
      lhs = modp(sv <<< KN, mv);
      rhs = modp(av * bv, mv);
      if (sv < 0) neg_res++;
      checks += 3;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d t=%0d congruence: m=%0d A=%0d B=%0d S=%0d", K, t, mv, av, bv, sv);
      end
      if (!(sv > -mv && sv < mv)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d range: m=%0d S=%0d", t, mv, sv);
      end
      if (lat != 3 * N + 5) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d latency %0d, expected %0d", t, lat, 3 * N + 5);
      end
    end
    checks++;
    if (neg_res == 0) begin failures++; $display("FAIL no negative result seen"); end
    $display("K=%0d N=%0d: negative results %0d, checks %0d, failures %0d",
             K, N, neg_res, checks, failures);
    finished = 1;
  end
endmodule
