// gf2m_mul_exhaustive: test helper that streams every (A, B, T) combination of a small field
// GF(2^M) through one multiplier instance, one set per clock with P = 0, and compares every
// result with the reference package. It raises done when the stream has drained and reports its
// check and failure counts.
module gf2m_mul_exhaustive #(
  parameter int M = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import gf_ref_pkg::*;

  localparam int NSETS = 1 << (3 * M);

  logic         in_valid, out_valid;
  logic [M-1:0] a, b, t, c;
  vec_t         exp_q[$];

  gf2m_systolic_mul #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .t(t), .p('0),
    .out_valid(out_valid), .c(c)
  );

  always @(posedge clk) begin
    if (rst_n && in_valid) exp_q.push_back(mac(vec_t'(a), vec_t'(b), vec_t'(t), '0, M));
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0 || vec_t'(c) !== exp_q[0]) begin
        failures++;
        $display("FAIL M=%0d c=%h", M, c);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; a = '0; b = '0; t = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NSETS; n++) begin
      in_valid = 1'b1;
      {a, b, t} = (3 * M)'(n);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (M + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL M=%0d: %0d results missing", M, exp_q.size());
    end
    done = 1'b1;
  end

endmodule
