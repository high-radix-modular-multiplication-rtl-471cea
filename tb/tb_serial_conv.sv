// tb_serial_conv: self-checking test of the bit-serial final conversion.
// Random borrow-save S with -m < S < m is loaded; the NB+1 bits of each
// stream are collected and compared with S (two's complement) and S + m.
// Also checks the framing: exactly NB+1 valid bits, last on the final one.
module tb_serial_conv;
  localparam int NB = 20;
  logic clk = 0, rst_n = 0, load = 0;
  logic [NB-1:0] sp, sn, m;
  logic valid, s_bit, sm_bit, last;
  int checks = 0, failures = 0, negs = 0;

  serial_conv #(.NB(NB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      longint mv, sv, pv, nv, got_s, got_sm;
      int nbits;
      logic [NB:0] bs, bsm;
      mv = longint'($urandom_range(3, (1 << (NB - 2)) - 1)) | 1;
      sv = longint'($urandom_range(0, 32'(mv - 1)));
      if ($urandom_range(0, 1)) sv = -sv;
      do begin
        pv = longint'($urandom_range(0, (1 << NB) - 1));
        nv = pv - sv;
      end while (nv < 0 || nv >= (64'sd1 << NB));
      @(negedge clk);
      sp = NB'(pv); sn = NB'(nv); m = NB'(mv); load = 1;
      @(negedge clk);
      load = 0;
      nbits = 0;
      while (1) begin
        if (valid) begin
          if (nbits <= NB) begin
            bs[nbits]  = s_bit;
            bsm[nbits] = sm_bit;
          end
          nbits++;
          if (last) break;
        end
        if (nbits > NB + 5) break;
        @(negedge clk);
      end
      @(negedge clk);
      got_s  = longint'($signed(bs));
      got_sm = longint'({43'd0, bsm});
      if (sv < 0) negs++;
      checks += 3;
      if (nbits != NB + 1) begin failures++; $display("FAIL %0d bits", nbits); end
      if (got_s != sv) begin
        failures++;
        if (failures < 10) $display("FAIL S=%0d got %0d", sv, got_s);
      end
      if (got_sm != sv + mv) begin
        failures++;
        if (failures < 10) $display("FAIL S+m=%0d got %0d", sv + mv, got_sm);
      end
    end
    checks++;
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
