// gf_pe_regular_tb: checks one regular processing element at m = 8 and at the default m = 163.
//
// Random A, P, T and b are applied; one clock later the registered outputs must equal
// A*x mod T and P + b*A, both computed with the reference package (long division rather than the
// shift-and-add used by the hardware). Half of the A values have their top bit forced to 1 so the
// reduction path is exercised; the test counts both b values and both reduction cases.
module gf_pe_regular_tb;
  import gf_ref_pkg::*;

  localparam int M8 = 8;
  localparam int MD = 163;
  localparam int N  = 400;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [M8-1:0] a8, p8, t8, ao8, po8;
  logic [MD-1:0] ad, pd, td, aod, pod;
  logic          b8, bd;
  int checks = 0, failures = 0;
  int n_reduce = 0, n_b1 = 0, n_b0 = 0;

  gf_pe_regular #(.M(M8)) dut8 (.clk(clk), .a_in(a8), .p_in(p8), .b_in(b8), .t_in(t8),
                                .a_out(ao8), .p_out(po8));
  gf_pe_regular dutd (.clk(clk), .a_in(ad), .p_in(pd), .b_in(bd), .t_in(td),
                      .a_out(aod), .p_out(pod));

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
    vec_t ea8, ep8, ead, epd;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      a8 = M8'(rand_vec(M8)); p8 = M8'(rand_vec(M8)); t8 = M8'(rand_vec(M8)); b8 = 1'($urandom);
      ad = MD'(rand_vec(MD)); pd = MD'(rand_vec(MD)); td = MD'(rand_vec(MD)); bd = 1'($urandom);
      if (n % 2 == 0) begin a8[M8-1] = 1'b1; ad[MD-1] = 1'b1; end
      if (n % 4 == 1) begin a8[M8-1] = 1'b0; ad[MD-1] = 1'b0; end
      ea8 = xtime(vec_t'(a8), vec_t'(t8), M8);
      ep8 = b8 ? vec_t'(p8 ^ a8) : vec_t'(p8);
      ead = xtime(vec_t'(ad), vec_t'(td), MD);
      epd = bd ? vec_t'(pd ^ ad) : vec_t'(pd);
      if (a8[M8-1]) n_reduce++;
      if (b8) n_b1++; else n_b0++;
      @(posedge clk);
      #1;
      check("m=8 A_{j+1}", vec_t'(ao8), ea8);
      check("m=8 P_{j+1}", vec_t'(po8), ep8);
      check("m=163 A_{j+1}", vec_t'(aod), ead);
      check("m=163 P_{j+1}", vec_t'(pod), epd);
    end
    checks++;
    if (n_reduce == 0 || n_b1 == 0 || n_b0 == 0) begin
      failures++;
      $display("FAIL coverage reduce=%0d b1=%0d b0=%0d", n_reduce, n_b1, n_b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
