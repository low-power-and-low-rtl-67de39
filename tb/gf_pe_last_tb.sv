// gf_pe_last_tb: checks the last processing element at m = 8 and at the default m = 163.
// One clock after random A, P and b are applied the registered C must equal P + b*A.
module gf_pe_last_tb;
  import gf_ref_pkg::*;

  localparam int M8 = 8;
  localparam int MD = 163;
  localparam int N  = 400;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [M8-1:0] a8, p8, c8;
  logic [MD-1:0] ad, pd, cd;
  logic          b8, bd;
  int checks = 0, failures = 0;
  int n_b1 = 0, n_b0 = 0;

  gf_pe_last #(.M(M8)) dut8 (.clk(clk), .a_in(a8), .p_in(p8), .b_in(b8), .c_out(c8));
  gf_pe_last dutd (.clk(clk), .a_in(ad), .p_in(pd), .b_in(bd), .c_out(cd));

  initial begin : watchdog
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input vec_t got, input vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    vec_t e8, ed;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      a8 = M8'(rand_vec(M8)); p8 = M8'(rand_vec(M8)); b8 = 1'($urandom);
      ad = MD'(rand_vec(MD)); pd = MD'(rand_vec(MD)); bd = 1'($urandom);
      e8 = '0; ed = '0;
      for (int i = 0; i < M8; i++) e8[i] = p8[i] ^ (b8 & a8[i]);
      for (int i = 0; i < MD; i++) ed[i] = pd[i] ^ (bd & ad[i]);
      if (b8) n_b1++; else n_b0++;
      @(posedge clk);
      #1;
      check("m=8 C", vec_t'(c8), e8);
      check("m=163 C", vec_t'(cd), ed);
    end
    checks++;
    if (n_b1 == 0 || n_b0 == 0) begin
      failures++;
      $display("FAIL coverage b1=%0d b0=%0d", n_b1, n_b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
