// tb_mont_mul: self-checking test of the S-Scheme Montgomery multiplier at
// three radices: K = 6 with N = 10 (60-digit operands), K = 4 with N = 12 and
// K = 8 with N = 6. Each mont_mul_check instance runs random and extreme
// operands of both signs in (-m, m) for random odd moduli m < 2^(K*N-2) and
// checks S*2^(K*N) == A*B (mod m), -m < S < m and the 3*N+5 clock latency.
module tb_mont_mul;
  logic clk = 0;
  logic fin6, fin4, fin8;
  int   c6, c4, c8, f6, f4, f8;

  always #5 clk = ~clk;

  mont_mul_check #(.K(6), .N(10), .TRIALS(400)) u_k6 (.clk(clk), .finished(fin6), .checks(c6), .failures(f6));
  mont_mul_check #(.K(4), .N(12), .TRIALS(200)) u_k4 (.clk(clk), .finished(fin4), .checks(c4), .failures(f4));
  mont_mul_check #(.K(8), .N(6),  .TRIALS(200)) u_k8 (.clk(clk), .finished(fin8), .checks(c8), .failures(f8));

  initial begin
    #50ms;
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c4 + c8, f6 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin6 && fin4 && fin8);
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c4 + c8, f6 + f4 + f8);
    $finish;
  end
endmodule
