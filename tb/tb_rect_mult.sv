// tb_rect_mult: self-checking test of the rectangular multiplier.
// Random radix 2^6 digits (three radix-4 digits in {-2..2}), random binary
// multiplicands and both signs; the borrow-save product must equal
// (-1)^neg * d * x.
module tb_rect_mult;
  import mm_pkg::*;
  localparam int W = 40;
  localparam int P = 3;
  r4_t  [P-1:0] d;
  logic [W-1:0] x, up, un;
  logic         neg;
  int checks = 0, failures = 0;

  rect_mult #(.W(W), .P(P)) dut (.d(d), .x(x), .neg(neg), .up(up), .un(un));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint dv, xv, uv, ref_v;
      dv = 0;
      for (int j = P - 1; j >= 0; j--) begin
        int a;
        a = $urandom_range(0, 4) - 2;
        d[j] = r4_from_int(a);
        dv = dv * 4 + a;
      end
      xv  = longint'({$urandom, $urandom}) & ((64'd1 << (W - 7)) - 1);
      if (t % 7 == 0) xv = (64'd1 << (W - 7)) - 1;
      x   = W'(xv);
      neg = 1'($urandom);
      #1;
      uv    = longint'({24'd0, up}) - longint'({24'd0, un});
      ref_v = neg ? -(dv * xv) : dv * xv;
      checks++;
      if (uv != ref_v) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d x=%0d neg=%0b: %0d", dv, xv, neg, uv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
