// gf2m_ref_pkg: reference arithmetic in GF(2^n) for the testbenches.
//
// Written independently of the RTL: multiplication is LSB-first
// shift-and-add with a reduction after every shift (the RTL multiplies
// MSB-first, D bits at a time, and squares by bit spreading). Elements are
// held in 256-bit vectors; n is the field degree and poly = f(x) - x^n.
package gf2m_ref_pkg;

  typedef logic [255:0] fe_t;

  // a * x mod f
  function automatic fe_t ref_xtime(fe_t a, int n, fe_t poly);
    fe_t r = a << 1;
    if (r[n]) begin
      r[n] = 1'b0;
      r ^= poly;
    end
    return r;
  endfunction

  function automatic fe_t ref_mul(fe_t a, fe_t b, int n, fe_t poly);
    fe_t r = '0;
    fe_t t = a;
    for (int i = 0; i < n; i++) begin
      if (b[i]) r ^= t;
      t = ref_xtime(t, n, poly);
    end
    return r;
  endfunction

  function automatic fe_t ref_sq(fe_t a, int n, fe_t poly);
    return ref_mul(a, a, n, poly);
  endfunction

  // a^(2^n - 2) = a^-1 for a != 0, by plain square-and-multiply
  function automatic fe_t ref_inv(fe_t a, int n, fe_t poly);
    fe_t r = fe_t'(1);
    for (int i = n - 1; i >= 0; i--) begin
      r = ref_sq(r, n, poly);
      if (i != 0) r = ref_mul(r, a, n, poly);
    end
    return r;
  endfunction

  // random element of degree < n
  function automatic fe_t ref_rand(int n);
    fe_t r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom();
    return r & ((fe_t'(1) << n) - fe_t'(1));
  endfunction

endpackage
