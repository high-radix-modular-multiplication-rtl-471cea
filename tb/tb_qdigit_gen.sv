// tb_qdigit_gen: self-checking test of the quotient digit selection (K = 6).
// For random odd moduli m (low K bits), m' = (-m)^-1 mod 2^K is found by
// search, and for random low digits of S the digit q must satisfy
// (S + q*m) mod 2^K = 0 and -2^(K-1) <= q < 2^(K-1); its radix-4 digits must
// lie in {-2..2} and add up to q.
module tb_qdigit_gen;
  import mm_pkg::*;
  localparam int K = 6;
  logic [K-1:0]   s_p, s_n, mprime, q;
  r4_t  [K/2-1:0] qd;
  int checks = 0, failures = 0;
  int negq = 0;

  qdigit_gen #(.K(K)) dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int mv, mp, sv, qv, dsum;
      mv = ($urandom_range(0, (1 << K) - 1)) | 1;
      mp = -1;
      for (int c = 0; c < (1 << K); c++)
        if (((mv * c) & ((1 << K) - 1)) == (1 << K) - 1) mp = c;
      s_p    = K'($urandom);
      s_n    = K'($urandom);
      mprime = K'(mp);
      #1;
      sv   = int'(s_p) - int'(s_n);
      qv   = int'($signed(q));
      dsum = 0;
      for (int j = K/2 - 1; j >= 0; j--) begin
        dsum = dsum * 4 + r4_value(qd[j]);
        if (qd[j].mag == 2'd3) failures++;
      end
      if (qv < 0) negq++;
      checks += 2;
      if (((sv + qv * mv) % (1 << K)) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL S=%0d m=%0d q=%0d", sv, mv, qv);
      end
      if (dsum != qv) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d digits give %0d", qv, dsum);
      end
    end
    checks++;
    if (negq == 0) begin failures++; $display("FAIL no negative q"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
