// gf2m_systolic_mul: bit-parallel polynomial-basis systolic multiplier over GF(2^m).
//
// Computes C = (P + A*B) mod T(x) for any field polynomial T(x) = x^m + t_{m-1}x^{m-1} + ... + t_0,
// with a new operand set accepted every clock. With P = 0 it is the plain field product.
//
// Structure: a chain of m processing elements. PE[j] (j < m-1, gf_pe_regular) takes the partial
// product P_j and the shifted multiplicand A_j = A * x^j mod T, adds A_j into P_j when b_j = 1 and
// passes on A_{j+1} = A_j * x mod T. The last PE (gf_pe_last) does only the conditional add and
// yields C. Every PE registers its outputs, so the critical path is one XOR plus one 2:1 MUX.
//
// Operand alignment (a choice of this design): because an operand set reaches PE[j] j clocks after
// it enters, T travels down the chain in registers alongside A and P, and bit b_j is delayed by j
// clocks, so that PE[j] sees the b_j and T of the same operand set. This is what lets a different A, B and T enter on every clock.
// A valid bit travels the same way; it is the only reset register.
//
// Timing: an operand set presented with in_valid = 1 before clock edge k appears on c with
// out_valid = 1 after edge k+m-1, i.e. m clocks later (latency m, throughput one result per clock).
//
// Interface: a, b, p and c are m-bit polynomial-basis vectors, bit i the coefficient of x^i; t is
// T(x) without its x^m term. rst_n is an active-low asynchronous reset of the valid chain.
module gf2m_systolic_mul #(
  parameter int unsigned M = gf2m_pkg::GF_M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] t,
  input  logic [M-1:0] p,
  output logic         out_valid,
  output logic [M-1:0] c
);

  if (M < 2) begin : g_bad_m
    $error("gf2m_systolic_mul: M must be at least 2");
  end

  // Operands as seen by PE[j]. a_s/p_s are the PE outputs; t_s are alignment registers.
  logic [M-1:0] a_s [M];
  logic [M-1:0] p_s [M];
  logic [M-1:0] t_s [M-1];
  logic [M-1:0] b_al;      // b_al[j]: bit b_j of the operand set now entering PE[j]
  logic [M:0]   v_s;

  assign a_s[0] = a;
  assign p_s[0] = p;
  assign t_s[0] = t;
  assign v_s[0] = in_valid;

  for (genvar j = 0; j < M - 1; j++) begin : g_pe
    gf_pe_regular #(.M(M)) u_pe (
      .clk   (clk),
      .a_in  (a_s[j]),
      .p_in  (p_s[j]),
      .b_in  (b_al[j]),
      .t_in  (t_s[j]),
      .a_out (a_s[j+1]),
      .p_out (p_s[j+1])
    );

    // T is not needed by the last PE.
    if (j < M - 2) begin : g_t
      always_ff @(posedge clk) begin
        t_s[j+1] <= t_s[j];
      end
    end
  end

  gf_pe_last #(.M(M)) u_pe_last (
    .clk   (clk),
    .a_in  (a_s[M-1]),
    .p_in  (p_s[M-1]),
    .b_in  (b_al[M-1]),
    .c_out (c)
  );

  // B alignment: bit j is delayed by j clocks in a shift register of its own, so only
  // m(m-1)/2 bits are stored in all.
  assign b_al[0] = b[0];
  for (genvar i = 1; i < M; i++) begin : g_bdly
    logic [i-1:0] sr;
    if (i == 1) begin : g_one
      always_ff @(posedge clk) sr <= b[i];
    end else begin : g_many
      always_ff @(posedge clk) sr <= {sr[i-2:0], b[i]};
    end
    assign b_al[i] = sr[i-1];
  end

  // Valid bit, one register per PE.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_s[M:1] <= '0;
    else        v_s[M:1] <= v_s[M-1:0];
  end

  assign out_valid = v_s[M];

endmodule
