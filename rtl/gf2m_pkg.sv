// gf2m_pkg: shared constants for the GF(2^m) polynomial-basis systolic multiplier.
//
// The multiplier takes the field polynomial T(x) = x^m + t_{m-1}x^{m-1} + ... + t_0 as a run-time
// input, so nothing here is built into the datapath. The package holds the default field degree
// (m = 163, the NIST binary field used as the main example) and the two example polynomials,
// written as their low m bits with the leading x^m left implicit:
//   T_NIST_B163 : x^163 + x^7 + x^6 + x^3 + 1
//   T_AES       : x^8 + x^4 + x^3 + x + 1   (0x1B, the AES field)
package gf2m_pkg;

  // Default field degree m.
  localparam int unsigned GF_M_DEFAULT = 163;

  // Low 163 bits of x^163 + x^7 + x^6 + x^3 + 1.
  localparam logic [162:0] T_NIST_B163 = 163'h0C9;

  // Low 8 bits of x^8 + x^4 + x^3 + x + 1.
  localparam logic [7:0] T_AES = 8'h1B;

endpackage
