// gf_pe_regular: one regular processing element, PE[j] for j = 0 .. m-2.
//
// It performs one iteration of the interleaved multiply-and-reduce step:
//   P_{j+1} = b_j ? (P_j ^ A_j) : P_j      addition node X(j) and decision node Y(j)
//   A_{j+1} = A_j * x mod T(x)             modular reduction node Z(j)
// The reduction shifts A_j left by one bit and, when the bit shifted out (a_{m-1,j}) is 1, adds
// the low m bits of T(x); the x^m term cancels the bit shifted out. Both halves are built from U
// cells: m cells for the product row (p = P_j[i], q = A_j[i], sel = b_j) and m cells for the
// reduction row (p = A_j[i-1] or 0 for i = 0, q = t_i, sel = a_{m-1,j}).
//
// Timing: A_{j+1} and P_{j+1} are registered at the PE output, so the critical path is one XOR plus
// one MUX and a result leaves the PE one clock after its operands arrive. The registers have no
// reset: they carry data only, and validity is tracked by the enclosing multiplier.
//
// Interface: t_in is T(x) without its leading x^m term (t_{m-1} .. t_0).
//
// The node functions, the U-cell split and the register cut at the PE boundary follow the
// published architecture. The reduction select is the top bit a_{m-1,j}, as the reduction algebra
// requires. The use of flip-flops rather than latches, and the absence of reset, are choices of
// this design.
module gf_pe_regular #(
  parameter int unsigned M = gf2m_pkg::GF_M_DEFAULT
) (
  input  logic         clk,
  input  logic [M-1:0] a_in,
  input  logic [M-1:0] p_in,
  input  logic         b_in,
  input  logic [M-1:0] t_in,
  output logic [M-1:0] a_out,
  output logic [M-1:0] p_out
);

  logic [M-1:0] a_shift;  // A_j shifted left by one, zero filled
  logic [M-1:0] a_next;   // A_j * x mod T
  logic [M-1:0] p_next;   // P_j + b_j A_j

  assign a_shift = {a_in[M-2:0], 1'b0};

  for (genvar i = 0; i < M; i++) begin : g_bit
    // Product row: addition and decision node, bit i.
    gf_u_cell u_prod (
      .p   (p_in[i]),
      .q   (a_in[i]),
      .sel (b_in),
      .r   (p_next[i])
    );
    // Reduction row: modular reduction node, bit i.
    gf_u_cell u_red (
      .p   (a_shift[i]),
      .q   (t_in[i]),
      .sel (a_in[M-1]),
      .r   (a_next[i])
    );
  end

  always_ff @(posedge clk) begin
    a_out <= a_next;
    p_out <= p_next;
  end

endmodule
