// gf2m_systolic_mul_full_tb: end-to-end test of the systolic multiplier at its default size,
// m = 163, with the NIST field polynomial x^163 + x^7 + x^6 + x^3 + 1.
//
// It first checks two hand-worked products: x^162 * x = x^163 = x^7 + x^6 + x^3 + 1, and
// 1 * 1 = 1 with P = x accumulated. It then streams random operand sets with idle cycles, random
// accumulate inputs and, now and then, a random T instead of the NIST polynomial. Every result is
// compared with the reference package, the latency is checked to be m clocks, and the test counts
// that reduction, back-to-back results, idle cycles, T changes and accumulation all occurred.
module gf2m_systolic_mul_full_tb;
  import gf_ref_pkg::*;
  import gf2m_pkg::*;

  localparam int M = GF_M_DEFAULT;
  localparam int NRAND = 600;

  typedef struct {
    vec_t exp;
    int   cyc_in;
  } item_t;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         in_valid, out_valid;
  logic [M-1:0] a, b, t, p, c;

  int checks = 0, failures = 0;
  int cyc = 0;
  item_t sb[$];
  int n_out = 0, n_b2b = 0, n_reduce = 0, n_bubble = 0, n_tchange = 0, n_pacc = 0;
  logic prev_out_valid = 1'b0;
  logic [M-1:0] prev_t = '0;
  logic prev_in_valid = 1'b0;

  gf2m_systolic_mul dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .t(t), .p(p),
    .out_valid(out_valid), .c(c)
  );

  initial begin : watchdog
    repeat (10 * (NRAND + 1000)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      item_t it;
      dvec_t d;
      it.exp    = mac(vec_t'(a), vec_t'(b), vec_t'(t), vec_t'(p), M);
      it.cyc_in = cyc;
      sb.push_back(it);
      d = clmul(vec_t'(a), vec_t'(b), M);
      if (|d[2*M-2:M]) n_reduce++;
      if (p != '0) n_pacc++;
      if (prev_in_valid && t != prev_t) n_tchange++;
    end
    if (rst_n && !in_valid) n_bubble++;
    prev_in_valid <= in_valid;
    prev_t <= t;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      item_t it;
      n_out++;
      if (prev_out_valid) n_b2b++;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL result with no operand set pending");
      end else begin
        it = sb.pop_front();
        if (vec_t'(c) !== it.exp) begin
          failures++;
          $display("FAIL c=%h expected %h", c, it.exp[M-1:0]);
        end
        checks++;
        if (cyc - it.cyc_in != M) begin
          failures++;
          $display("FAIL latency %0d clocks, expected %0d", cyc - it.cyc_in, M);
        end
      end
    end
    prev_out_valid = out_valid;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; t = '0; p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Hand-worked products, back to back.
    in_valid = 1'b1;
    a = '0; a[M-1] = 1'b1;
    b = M'(2);
    t = T_NIST_B163;
    p = '0;
    @(negedge clk);
    a = M'(1); b = M'(1); p = M'(2);
    @(negedge clk);
    in_valid = 1'b0;
    wait (out_valid);
    #2;
    checks++;
    if (c !== M'(163'hC9)) begin
      failures++;
      $display("FAIL x^162 * x gave %h, expected c9", c);
    end
    @(posedge clk);
    #2;
    checks++;
    if (!out_valid || c !== M'(3)) begin
      failures++;
      $display("FAIL 1*1 + x gave %h (valid %b), expected 3", c, out_valid);
    end
    repeat (4) @(negedge clk);

    // Random stream.
    for (int n = 0; n < NRAND; n++) begin
      in_valid = ($urandom % 8) != 0;
      a = M'(rand_vec(M));
      b = M'(rand_vec(M));
      t = ($urandom % 4 == 0) ? M'(rand_vec(M)) : T_NIST_B163;
      p = ($urandom % 2 == 0) ? '0 : M'(rand_vec(M));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (M + 4) @(negedge clk);

    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d operand sets never produced a result", sb.size());
    end
    $display("mechanisms: results=%0d back_to_back=%0d reduce=%0d idle=%0d t_change=%0d p_acc=%0d",
             n_out, n_b2b, n_reduce, n_bubble, n_tchange, n_pacc);
    checks++;
    if (n_b2b == 0 || n_reduce == 0 || n_bubble == 0 || n_tchange == 0 || n_pacc == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
