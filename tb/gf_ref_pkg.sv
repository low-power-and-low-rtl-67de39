// gf_ref_pkg: reference arithmetic for the GF(2^m) multiplier testbenches.
//
// The reference works differently from the hardware on purpose: it forms the full carry-less
// product D = A*B of degree up to 2m-2 first and then reduces D by long division with
// T(x) = x^m + t, from the top degree down. Vectors are held in a fixed MAXW-bit container; only
// the low m bits are meaningful and t excludes the x^m term.
package gf_ref_pkg;

  localparam int MAXW = 600;
  typedef logic [MAXW-1:0]   vec_t;
  typedef logic [2*MAXW-1:0] dvec_t;

  // Carry-less product of two polynomials of degree below m.
  function automatic dvec_t clmul(input vec_t a, input vec_t b, input int m);
    dvec_t d = '0;
    for (int i = 0; i < m; i++)
      for (int k = 0; k < m; k++)
        d[i+k] = d[i+k] ^ (a[i] & b[k]);
    return d;
  endfunction

  // D mod (x^m + t) by long division.
  function automatic vec_t reduce(input dvec_t d, input vec_t t, input int m);
    dvec_t r = d;
    vec_t  c = '0;
    for (int deg = 2*m - 2; deg >= m; deg--) begin
      if (r[deg]) begin
        r[deg] = 1'b0;
        for (int i = 0; i < m; i++)
          if (t[i]) r[deg-m+i] = ~r[deg-m+i];
      end
    end
    for (int i = 0; i < m; i++) c[i] = r[i];
    return c;
  endfunction

  // (p + a*b) mod (x^m + t).
  function automatic vec_t mac(input vec_t a, input vec_t b, input vec_t t, input vec_t p,
                               input int m);
    vec_t c = reduce(clmul(a, b, m), t, m);
    for (int i = 0; i < m; i++) c[i] = c[i] ^ p[i];
    return c;
  endfunction

  // a*x mod (x^m + t).
  function automatic vec_t xtime(input vec_t a, input vec_t t, input int m);
    dvec_t d = '0;
    for (int i = 0; i < m; i++) d[i+1] = a[i];
    return reduce(d, t, m);
  endfunction

  // Random m-bit vector.
  function automatic vec_t rand_vec(input int m);
    vec_t v = '0;
    for (int i = 0; i < m; i++) v[i] = 1'($urandom);
    return v;
  endfunction

endpackage
