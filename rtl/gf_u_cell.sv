// gf_u_cell: the basic cell of the systolic GF(2^m) multiplier.
//
// One 2-input XOR and one 2:1 multiplexer: r = sel ? (p ^ q) : p. The same cell serves two roles.
// In the product rows it is one bit of an addition/decision node: p is a bit of the partial product
// P_j, q the matching bit of A_j and sel the coefficient b_j. In the reduction rows it is one bit of
// the modular-reduction node: p is the shifted-in bit a_{i-1,j}, q is t_i and sel the top bit
// a_{m-1,j}. Purely combinational; the pipeline registers sit in the processing elements.
// The cell is exactly the published one: r = p.~sel + (p ^ q).sel.
module gf_u_cell (
  input  logic p,
  input  logic q,
  input  logic sel,
  output logic r
);

  logic x;

  always_comb begin
    x = p ^ q;
    r = sel ? x : p;
  end

endmodule
