// k2_ref_pkg - bit-accurate software-style reference model of the K2 stream cipher,
// used by the testbenches to work out expected values independently of the RTL.
//
// It deliberately computes things differently from the RTL: field products are
// carry-less products reduced afterwards, the S-box inverse is found by search, the
// affine map is applied row by row from its matrix, the alpha multiplications reduce
// a degree-4 polynomial over GF(2^8), and the cipher state is kept as a history of
// all words (A_x and B_x indexed by absolute time x) rather than as shift registers.
package k2_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef logic [7:0]  b8_t;

  function automatic b8_t rmul(b8_t a, b8_t b, logic [8:0] poly);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(poly) << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8_t rpow2(int k, logic [8:0] poly);
    b8_t r;
    r = 8'h01;
    for (int i = 0; i < k; i++) r = rmul(r, 8'h02, poly);
    return r;
  endfunction

  function automatic b8_t rsbox(b8_t x);
    b8_t inv, y;
    b8_t rows [8];
    inv = 8'h00;
    for (int c = 1; c < 256; c++) if (rmul(x, b8_t'(c), 9'h11B) == 8'h01) inv = b8_t'(c);
    // rows of the affine matrix, first row gives b7, columns a7..a0
    rows = '{8'b11111000, 8'b01111100, 8'b00111110, 8'b00011111,
             8'b10001111, 8'b11000111, 8'b11100011, 8'b11110001};
    for (int r = 0; r < 8; r++) y[7 - r] = ^(rows[r] & inv);
    return y ^ 8'b01100011;
  endfunction

  function automatic w32_t rsub(w32_t x);
    b8_t c [4];
    b8_t d [4];
    b8_t m [4][4];
    m = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
          '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    for (int i = 0; i < 4; i++) c[i] = rsbox(x[8*i +: 8]);
    for (int i = 0; i < 4; i++) begin
      d[i] = 8'h00;
      for (int j = 0; j < 4; j++) d[i] ^= rmul(m[i][j], c[j], 9'h11B);
    end
    return {d[3], d[2], d[1], d[0]};
  endfunction

  // Y * alpha where alpha^4 + e3 x^3 + e2 x^2 + e1 x + e0 = 0, coefficients g^ek.
  function automatic w32_t ralpha(w32_t y, logic [8:0] poly, int k3, int k2, int k1, int k0);
    b8_t p [5];
    b8_t cf [4];
    cf[3] = rpow2(k3, poly); cf[2] = rpow2(k2, poly);
    cf[1] = rpow2(k1, poly); cf[0] = rpow2(k0, poly);
    p[0] = 8'h00;
    for (int i = 0; i < 4; i++) p[i + 1] = y[8*i +: 8];   // multiply by x
    for (int i = 0; i < 4; i++) p[i] ^= rmul(p[4], cf[i], poly); // reduce x^4
    return {p[3], p[2], p[1], p[0]};
  endfunction

  function automatic w32_t ra0(w32_t y); return ralpha(y, 9'h1C3, 24, 3, 12, 71);     endfunction
  function automatic w32_t ra1(w32_t y); return ralpha(y, 9'h12D, 230, 156, 93, 29);  endfunction
  function automatic w32_t ra2(w32_t y); return ralpha(y, 9'h14D, 34, 16, 199, 248);  endfunction
  function automatic w32_t ra3(w32_t y); return ralpha(y, 9'h165, 157, 253, 56, 16);  endfunction

  typedef w32_t kexp_t [12];

  function automatic kexp_t rkeysched(logic [127:0] key);
    kexp_t k;
    for (int i = 0; i < 4; i++) k[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 12; i++) begin
      if (i % 4 == 0)
        k[i] = k[i-4] ^ rsub((k[i-1] << 8) ^ (k[i-1] >> 24)) ^ {rpow2(i/4 - 1, 9'h11B), 24'h0};
      else
        k[i] = k[i-4] ^ k[i-1];
    end
    return k;
  endfunction

  // Whole-cipher model with absolute-time histories.
  class K2Model;
    w32_t A [$];
    w32_t B [$];
    w32_t r1, r2, l1, l2;
    int   t;

    function void setup(logic [127:0] key, logic [127:0] iv);
      kexp_t k;
      w32_t ivw [4];
      k = rkeysched(key);
      for (int i = 0; i < 4; i++) ivw[i] = iv[127 - 32*i -: 32];
      A.delete(); B.delete();
      for (int m = 0; m < 5; m++) A.push_back(k[4 - m]);
      B = '{k[10], k[11], ivw[0], ivw[1], k[8], k[9], ivw[2], ivw[3], k[7], k[5], k[6]};
      r1 = 0; r2 = 0; l1 = 0; l2 = 0; t = 0;
      for (int j = 0; j < 24; j++) clock(1'b1);
    endfunction

    function w32_t zl(); return (B[t] + r2) ^ r1 ^ A[t + 4];  endfunction
    function w32_t zh(); return (B[t + 10] + l2) ^ l1 ^ A[t]; endfunction

    function void clock(bit init);
      w32_t na, nb, m0, m8, h, lo;
      bit c1, c2;
      h = zh(); lo = zl();
      c1 = A[t + 2][30]; c2 = A[t + 2][31];
      m0 = c1 ? ra1(B[t]) : ra2(B[t]);
      m8 = c2 ? ra3(B[t + 8]) : B[t + 8];
      na = ra0(A[t]) ^ A[t + 3];
      nb = m0 ^ B[t + 1] ^ B[t + 6] ^ m8;
      if (init) begin na ^= lo; nb ^= h; end
      A.push_back(na); B.push_back(nb);
      {r1, r2, l1, l2} = {rsub(l2 + B[t + 9]), rsub(r1), rsub(r2 + B[t + 4]), rsub(l1)};
      t++;
    endfunction

    // keystream word of the current time, then advance
    function logic [63:0] next();
      logic [63:0] z;
      z = {zh(), zl()};
      clock(1'b0);
      return z;
    endfunction
  endclass

endpackage
