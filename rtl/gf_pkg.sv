// gf_pkg: binary extension field GF(2^m) arithmetic shared by the BCH and
// Reed-Solomon codecs of the serial code concatenation.
//
// Field elements are held in a fixed 16-bit container (gf_t); only the low m
// bits are meaningful. The field is built from a primitive polynomial given
// as an integer with bit m set (for example 'h805 = x^11 + x^2 + 1).
// The functions are written with loops over constant bounds so that they can
// be used both at elaboration time (generator polynomials, Chien start
// values) and as combinational logic (a general multiplier, an inverter).
// The choice of primitive polynomials is this design's own; the codes'
// lengths, dimensions and field sizes follow the reference configuration.
package gf_pkg;

  localparam int GF_MAXM = 16;
  typedef logic [GF_MAXM-1:0] gf_t;

  // Product a*b in GF(2^m) (shift-and-add with modular reduction).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input int m, input int prim);
    gf_t r;
    gf_t aa;
    r  = '0;
    aa = a;
    for (int i = 0; i < GF_MAXM; i++) begin
      if (i < m) begin
        if (b[i]) r = r ^ aa;
        aa = aa << 1;
        if (aa[m]) aa = aa ^ gf_t'(prim);
      end
    end
    return r;
  endfunction

  // a^e for a non-negative exponent (square and multiply).
  function automatic gf_t gf_pow(input gf_t a, input int unsigned e, input int m, input int prim);
    gf_t r;
    gf_t s;
    r = gf_t'(1);
    s = a;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = gf_mul(r, s, m, prim);
      s = gf_mul(s, s, m, prim);
    end
    return r;
  endfunction

  // alpha^e with alpha = x, for any integer exponent (reduced mod 2^m-1).
  function automatic gf_t gf_alpha(input int e, input int m, input int prim);
    int n;
    int ee;
    n  = (1 << m) - 1;
    ee = e % n;
    if (ee < 0) ee = ee + n;
    return gf_pow(gf_t'(2), ee, m, prim);
  endfunction

  // Multiplicative inverse a^(2^m-2); returns 0 for a = 0.
  function automatic gf_t gf_inv(input gf_t a, input int m, input int prim);
    gf_t r;
    gf_t s;
    // 2^m - 2 has bits 1 .. m-1 set: a^(2+4+...+2^(m-1)).
    r = gf_t'(1);
    s = gf_mul(a, a, m, prim);
    for (int i = 1; i < GF_MAXM; i++) begin
      if (i < m) begin
        r = gf_mul(r, s, m, prim);
        s = gf_mul(s, s, m, prim);
      end
    end
    return r;
  endfunction

endpackage
