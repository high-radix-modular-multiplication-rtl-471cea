// tb_bs_add: self-checking test of the borrow-save adder.
// Random operands whose digit vectors span the full width (including
// representations with large top digits but small value, which the top
// renormalisation must fold) are added; the value of the result is compared
// with the integer sum. W = 24 keeps every value inside a longint.
module tb_bs_add;
  localparam int W = 24;
  logic [W-1:0] xp, xn, yp, yn, zp, zn;
  int checks = 0, failures = 0;
  int folded = 0;

  bs_add #(.W(W), .G(4)) dut (.*);

  // random borrow-save vector pair with value v
  task automatic make_bs(input longint v, output logic [W-1:0] p, output logic [W-1:0] n);
    longint pv, nv;
    do begin
      pv = longint'($urandom) & ((64'd1 << W) - 1);
      if ($urandom_range(0, 3) == 0) pv = pv >> $urandom_range(0, W - 1);
      nv = pv - v;
    end while (nv < 0 || nv >= (64'sd1 << W));
    p = W'(pv);
    n = W'(nv);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint vx, vy, vz;
      longint lim;
      lim = 64'sd1 << ($urandom_range(1, W - 2));
      vx = longint'($urandom_range(0, 32'hffff_ffff)) % lim;
      vy = longint'($urandom_range(0, 32'hffff_ffff)) % lim;
      if ($urandom_range(0, 1)) vx = -vx;
      if ($urandom_range(0, 1)) vy = -vy;
      make_bs(vx, xp, xn);
      make_bs(vy, yp, yn);
      #1;
      vz = longint'({40'd0, zp}) - longint'({40'd0, zn});
      checks++;
      if (vz != vx + vy) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d gave %0d", vx, vy, vz);
      end
      if ((xp[W-1] | xn[W-1] | yp[W-1] | yn[W-1]) != 1'b0) folded++;
    end
    checks++;
    if (folded == 0) begin
      failures++;
      $display("FAIL no operand used the top digit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
