// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.  Field arithmetic is done by carry-less
// multiplication followed by polynomial reduction (the RTL instead steps a
// Galois LFSR), and the selection rules are evaluated directly from the
// partition formulas rather than from counters.
package tb_ref_pkg;

  // Full primitive polynomials, x^n term included.
  function automatic int unsigned full_poly(input int unsigned n);
    case (n)
      2: return 'b111;
      3: return 'b1011;
      4: return 'b10011;
      5: return 'b100101;
      6: return 'b1000011;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned n);
    int unsigned prod = 0;
    for (int i = 0; i < n; i++) if (b[i]) prod ^= a << i;
    for (int i = 2 * n - 2; i >= int'(n); i--)
      if (prod[i]) prod ^= full_poly(n) << (i - n);
    return prod;
  endfunction

  // g * alpha^e, with alpha = x (= 2).
  function automatic int unsigned gf_scale(input int unsigned g, input int unsigned e,
                                           input int unsigned n);
    int unsigned r = g;
    int unsigned ee = e % ((1 << n) - 1);
    for (int unsigned i = 0; i < ee; i++) r = gf_mul(r, 2, n);
    return r;
  endfunction

  // Formula (1): row r belongs to partition p of group g.
  function automatic bit row_in_partition(input int unsigned n, input int unsigned r,
                                          input int unsigned p, input int unsigned g);
    int unsigned k   = r >> n;
    int unsigned off = r & ((1 << n) - 1);
    int unsigned d   = (k == 0) ? 0 : gf_scale(g, k - 1, n);
    return off == (p ^ d);
  endfunction

  // Bit b of word w is observed for partition p, column group g.
  function automatic bit bit_in_partition(input int unsigned n, input int unsigned wb,
                                          input int unsigned w, input int unsigned b,
                                          input int unsigned p, input int unsigned g);
    int unsigned m = 1 << wb;
    int unsigned j = b >> n;
    int unsigned v = b & ((1 << n) - 1);
    int unsigned e = (j == 0 && w == 0) ? 0 : gf_scale(g, w + j * m, n);
    return v == (p ^ e);
  endfunction

  // Signature register reference: 32-stage ring, feedback polynomial
  // x^32 + x^22 + x^2 + x + 1, input c injected at stages c%32 and
  // (c%32 + 1 + c/32) % 32.  Input vector up to 256 bits.
  function automatic logic [31:0] mirg_step(input logic [31:0] s, input logic [255:0] d,
                                            input int unsigned in_w);
    logic [31:0] r;
    logic        fb = s[31];
    for (int i = 31; i > 0; i--) r[i] = s[i-1];
    r[0] = fb;
    r[1] ^= fb;
    r[2] ^= fb;
    r[22] ^= fb;
    for (int unsigned c = 0; c < in_w; c++) begin
      int unsigned a = c % 32;
      int unsigned b = (a + 1 + c / 32) % 32;
      r[a] ^= d[c];
      r[b] ^= d[c];
    end
    return r;
  endfunction

  // Fault-free ROM contents: a pseudo-random fill.  Word `addr` ({row,
  // word}), 32-bit chunk `chunk`.
  function automatic logic [31:0] rom_chunk(input int unsigned addr, input int unsigned chunk);
    logic [31:0] h = addr * 32'h9E37_79B1 ^ (chunk + 1) * 32'h85EB_CA77;
    h ^= h >> 15;
    h *= 32'h2C1B_3C6D;
    h ^= h >> 12;
    return h;
  endfunction

endpackage
