// rom_diag_pkg: shared arithmetic for the ROM diagnosis test logic.
//
// The row and column selectors are driven by "diffractors": n-bit Galois
// LFSRs whose characteristic polynomial is primitive, so that one step
// multiplies the state by the generator alpha of GF(2^n).  Starting from a
// group number g the diffractor visits g, g*alpha, g*alpha^2, ... and runs
// through all 2^n-1 non-zero states.  A phase shifter is the constant
// multiplication by alpha^k, i.e. k steps of the same linear map.
//
// The polynomials x^2+x+1, x^3+x+1 and x^5+x^2+1 are the ones used in the
// worked examples and in the trellis experiment; the others are standard
// primitive polynomials chosen here to cover further sizes.
package rom_diag_pkg;

  // Low-order coefficients (x^{n-1} .. x^0) of a primitive polynomial of
  // degree n; the x^n term is implicit.
  function automatic logic [15:0] diff_poly(input int unsigned n);
    case (n)
      2:       return 16'h0003;  // x^2 + x + 1
      3:       return 16'h0003;  // x^3 + x + 1
      4:       return 16'h0003;  // x^4 + x + 1
      5:       return 16'h0005;  // x^5 + x^2 + 1
      6:       return 16'h0003;  // x^6 + x + 1
      7:       return 16'h0003;  // x^7 + x + 1
      8:       return 16'h001D;  // x^8 + x^4 + x^3 + x^2 + 1
      9:       return 16'h0011;  // x^9 + x^4 + 1
      10:      return 16'h0009;  // x^10 + x^3 + 1
      default: return 16'h0000;
    endcase
  endfunction

  // One diffractor step: multiply an n-bit field element by alpha.
  function automatic logic [15:0] gf_mul_alpha(input logic [15:0] s,
                                               input int unsigned n);
    logic [15:0] mask;
    logic [15:0] r;
    mask = (16'h1 << n) - 16'h1;
    r = (s << 1) & mask;
    if (s[n-1]) r = r ^ diff_poly(n);
    return r & mask;
  endfunction

  // k diffractor steps: multiply by alpha^k (k below 2^n is enough, since
  // alpha^(2^n-1) = 1).
  function automatic logic [15:0] gf_mul_alpha_pow(input logic [15:0] s,
                                                   input int unsigned k,
                                                   input int unsigned n);
    logic [15:0] r;
    r = s;
    for (int unsigned i = 0; i < k; i++) r = gf_mul_alpha(r, n);
    return r;
  endfunction

  // Lowest-order coefficients of the signature register's primitive
  // polynomial x^32 + x^22 + x^2 + x + 1.
  localparam logic [31:0] MIRG_POLY32 = 32'h0040_0007;

endpackage
