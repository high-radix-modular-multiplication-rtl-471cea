// tb_r4_recode: self-checking test of the radix-4 multiplier recoder.
// Random borrow-save inputs; every output digit must lie in {-2..2} and the
// digits must add up (weights 4^j) to the value of the input. Also checks
// that the top transfer digit and digits of magnitude 2 were produced.
module tb_r4_recode;
  import mm_pkg::*;
  localparam int ND = 24;
  logic [ND-1:0] bp, bn;
  r4_t [ND/2:0]  d;
  int checks = 0, failures = 0;
  int top_nz = 0, mag2 = 0;

  r4_recode #(.ND(ND)) dut (.bp(bp), .bn(bn), .d(d));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint v, s;
      bp = ND'($urandom);
      bn = ND'($urandom);
      if (t % 3 == 0) bn = bn & ~bp;
      if (t % 5 == 1) bn = '0;
      #1;
      v = longint'({40'd0, bp}) - longint'({40'd0, bn});
      s = 0;
      for (int j = ND/2; j >= 0; j--) begin
        s = s * 4 + longint'(r4_value(d[j]));
        checks++;
        if (d[j].mag == 2'd3 || (d[j].neg && d[j].mag == 2'd0)) begin
          failures++;
          $display("FAIL digit %0d has bad encoding", j);
        end
        if (d[j].mag == 2'd2) mag2++;
      end
      if (d[ND/2].mag != 0) top_nz++;
      checks++;
      if (s != v) begin
        failures++;
        if (failures < 10) $display("FAIL value %0d recoded to %0d", v, s);
      end
    end
    checks += 2;
    if (top_nz == 0) begin failures++; $display("FAIL top transfer never set"); end
    if (mag2 == 0)   begin failures++; $display("FAIL no digit of magnitude 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
