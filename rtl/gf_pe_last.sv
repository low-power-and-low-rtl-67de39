// gf_pe_last: the last processing element, PE[m-1].
//
// The final iteration needs no further reduction of A, so this PE holds only the product row of m
// U cells: C = b_{m-1} ? (P_{m-1} ^ A_{m-1}) : P_{m-1}. The result is registered, so C leaves the
// PE one clock after its operands arrive and the whole multiplier has one register per PE.
// The register has no reset; the enclosing multiplier tracks which outputs are valid.
// The cell structure follows the published last PE; the output register is this design's choice,
// made so that the total latency is m clocks as specified.
module gf_pe_last #(
  parameter int unsigned M = gf2m_pkg::GF_M_DEFAULT
) (
  input  logic         clk,
  input  logic [M-1:0] a_in,
  input  logic [M-1:0] p_in,
  input  logic         b_in,
  output logic [M-1:0] c_out
);

  logic [M-1:0] c_next;

  for (genvar i = 0; i < M; i++) begin : g_bit
    gf_u_cell u_prod (
      .p   (p_in[i]),
      .q   (a_in[i]),
      .sel (b_in),
      .r   (c_next[i])
    );
  end

  always_ff @(posedge clk) begin
    c_out <= c_next;
  end

endmodule
