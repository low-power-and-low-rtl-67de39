// gf2m_systolic_mul_small_tb: exhaustive test of the multiplier at the smallest sizes, m = 2, 3
// and 4, where every (A, B, T) combination can be streamed through back to back. The m = 2 case
// has no T alignment register at all and the m = 3 case only one, so these catch off-by-one
// errors at the ends of the chain.
module gf2m_systolic_mul_small_tb;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic done2, done3, done4;
  int   ch2, ch3, ch4, f2, f3, f4;

  gf2m_mul_exhaustive #(.M(2)) u2 (.clk(clk), .rst_n(rst_n), .done(done2), .checks(ch2), .failures(f2));
  gf2m_mul_exhaustive #(.M(3)) u3 (.clk(clk), .rst_n(rst_n), .done(done3), .checks(ch3), .failures(f3));
  gf2m_mul_exhaustive #(.M(4)) u4 (.clk(clk), .rst_n(rst_n), .done(done4), .checks(ch4), .failures(f4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch2 + ch3 + ch4, f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done2 && done3 && done4);
    $display("TB_RESULT checks=%0d failures=%0d", ch2 + ch3 + ch4, f2 + f3 + f4);
    $finish;
  end

endmodule
