// gf2m_systolic_mul_tb: end-to-end test of the systolic multiplier at m = 8.
//
// Phase 1 streams seven operand sets on consecutive clocks, each with its own A, B and T, and
// checks the published example results (the first is the AES field product {83}*{57} = {C1} with
// T = {1B}). Phase 2 streams random A, B, T and P with random idle cycles. Every result is compared
// with the reference package, and the time from an operand set's sampling edge to its result is
// checked to be m clocks. The test also counts that each mechanism occurred: a product needing
// reduction, back-to-back results at one per clock, an idle cycle in the stream, a change of T
// between consecutive operand sets and a non-zero accumulate input P.
module gf2m_systolic_mul_tb;
  import gf_ref_pkg::*;

  localparam int M = 8;
  localparam int NRAND = 3000;

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

  gf2m_systolic_mul #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .t(t), .p(p),
    .out_valid(out_valid), .c(c)
  );

  initial begin : watchdog
    repeat (10 * (NRAND + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: record each accepted operand set, check each result.
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

  // Published example: {a, b, t, expected c}.
  localparam logic [31:0] FIG_VECS [7] = '{
    32'h83_57_1B_C1, 32'h27_49_43_41, 32'h24_33_1B_F6, 32'h79_AB_69_1B,
    32'hB1_8F_4D_99, 32'hFC_31_95_3A, 32'hCD_35_98_F9
  };

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; t = '0; p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Phase 1: example vectors, back to back, P = 0. Also check the printed results directly.
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (mac(vec_t'(FIG_VECS[k][31:24]), vec_t'(FIG_VECS[k][23:16]), vec_t'(FIG_VECS[k][15:8]),
              '0, M) !== vec_t'(FIG_VECS[k][7:0])) begin
        failures++;
        $display("FAIL reference disagrees with example %0d", k);
      end
      in_valid = 1'b1;
      {a, b, t} = FIG_VECS[k][31:8];
      p = '0;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (M + 2) @(negedge clk);
    checks++;
    if (n_out != 7) begin
      failures++;
      $display("FAIL %0d results from the example stream, expected 7", n_out);
    end

    // Phase 2: random stream with idle cycles and accumulate input.
    for (int n = 0; n < NRAND; n++) begin
      in_valid = ($urandom % 8) != 0;
      a = M'(rand_vec(M));
      b = M'(rand_vec(M));
      t = ($urandom % 4 == 0) ? 8'h1B : M'(rand_vec(M));
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
