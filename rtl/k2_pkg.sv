// k2_pkg - shared constants, types and arithmetic for the K2 keystream generator.
//
// K2 works on 32-bit words that are read as four bytes (Y3,Y2,Y1,Y0), Y3 the most
// significant. Two kinds of finite-field arithmetic are needed:
//   * GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1 for the S-box inverse and the
//     MixColumn permutation of the Sub step;
//   * multiplication of a word by alpha0..alpha3, the roots of four degree-4
//     polynomials over GF(2^8). Each GF(2^8) is defined by its own primitive
//     polynomial (beta, gamma, delta, zeta). Multiplying Y by alpha is a byte shift
//     towards the top plus the top byte Y3 times the four polynomial coefficients:
//       alpha*Y = (Y2 ^ Y3*c3, Y1 ^ Y3*c2, Y0 ^ Y3*c1, Y3*c0)
//     where alpha^4 = c3*alpha^3 + c2*alpha^2 + c1*alpha + c0.
// The polynomials and exponents follow the K2 cipher definition; the coefficient bytes
// are computed here by constant functions, so no table is pasted into the source.
// The word layout of the taps handed to the nonlinear function is a struct of this
// package, shared by the three nonlinear-function variants.
package k2_pkg;

  typedef logic [31:0] word_t;
  typedef logic [7:0]  byte_t;

  // Number of initialisation clocks after the state is loaded.
  localparam int unsigned INIT_CLOCKS = 24;

  // Primitive polynomials (bit 8 set) of the GF(2^8) fields.
  localparam logic [8:0] POLY_AES   = 9'h11B; // x^8+x^4+x^3+x+1
  localparam logic [8:0] POLY_BETA  = 9'h1C3; // x^8+x^7+x^6+x+1
  localparam logic [8:0] POLY_GAMMA = 9'h12D; // x^8+x^5+x^3+x^2+1
  localparam logic [8:0] POLY_DELTA = 9'h14D; // x^8+x^6+x^3+x^2+1
  localparam logic [8:0] POLY_ZETA  = 9'h165; // x^8+x^6+x^5+x^2+1

  // Taps of the two shift registers that the nonlinear function reads.
  // Stage i of FSR-A holds A_{t+i}, stage i of FSR-B holds B_{t+i}.
  typedef struct packed {
    word_t a0;   // A_t
    word_t a4;   // A_{t+4}
    word_t b0;   // B_t
    word_t b4;   // B_{t+4}
    word_t b5;   // B_{t+5} = B_{t+1+4}, used by the look-ahead adders
    word_t b9;   // B_{t+9}
    word_t b10;  // B_{t+10}
  } nlf_taps_t;

  // Multiply two field elements modulo poly.
  function automatic byte_t gf_mul(byte_t a, byte_t b, logic [8:0] poly);
    byte_t r;
    byte_t x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ poly[7:0]) : (x << 1);
    end
    return r;
  endfunction

  // base^e modulo poly, square-and-multiply.
  function automatic byte_t gf_pow(byte_t base, int unsigned e, logic [8:0] poly);
    byte_t r;
    byte_t b;
    r = 8'h01;
    b = base;
    for (int i = 0; i < 9; i++) begin
      if (e[i]) r = gf_mul(r, b, poly);
      b = gf_mul(b, b, poly);
    end
    return r;
  endfunction

  // AES S-box: g = inverse (0 maps to 0), then the affine map f with constant 0x63.
  function automatic byte_t sbox_calc(byte_t a);
    byte_t inv;
    byte_t b;
    inv = gf_pow(a, 254, POLY_AES); // a^254 = a^-1, and 0^254 = 0
    for (int i = 0; i < 8; i++)
      b[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return b ^ 8'h63;
  endfunction

  // Multiplication by x (0x02) in the AES field.
  function automatic byte_t xtime(byte_t a);
    return a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
  endfunction

  // AES MixColumn on C = (c3,c2,c1,c0), c0 the least significant byte:
  // d0 = 2c0+3c1+c2+c3, d1 = c0+2c1+3c2+c3, d2 = c0+c1+2c2+3c3, d3 = 3c0+c1+c2+2c3.
  function automatic word_t mix_column(word_t c);
    byte_t c0, c1, c2, c3, d0, d1, d2, d3;
    {c3, c2, c1, c0} = c;
    d0 = xtime(c0) ^ xtime(c1) ^ c1 ^ c2 ^ c3;
    d1 = c0 ^ xtime(c1) ^ xtime(c2) ^ c2 ^ c3;
    d2 = c0 ^ c1 ^ xtime(c2) ^ xtime(c3) ^ c3;
    d3 = xtime(c0) ^ c0 ^ c1 ^ c2 ^ xtime(c3);
    return {d3, d2, d1, d0};
  endfunction

  // Coefficients (c3,c2,c1,c0) of alpha^4 for each alpha, as byte constants.
  typedef byte_t coef_t [4];

  function automatic coef_t alpha_coef(logic [8:0] poly, int unsigned e3, int unsigned e2,
                                       int unsigned e1, int unsigned e0);
    coef_t c;
    c[3] = gf_pow(8'h02, e3, poly);
    c[2] = gf_pow(8'h02, e2, poly);
    c[1] = gf_pow(8'h02, e1, poly);
    c[0] = gf_pow(8'h02, e0, poly);
    return c;
  endfunction

  // alpha0: x^4 + b^24 x^3 + b^3 x^2 + b^12 x + b^71
  localparam coef_t ALPHA0 = alpha_coef(POLY_BETA, 24, 3, 12, 71);
  // alpha1: x^4 + g^230 x^3 + g^156 x^2 + g^93 x + g^29
  localparam coef_t ALPHA1 = alpha_coef(POLY_GAMMA, 230, 156, 93, 29);
  // alpha2: x^4 + d^34 x^3 + d^16 x^2 + d^199 x + d^248
  localparam coef_t ALPHA2 = alpha_coef(POLY_DELTA, 34, 16, 199, 248);
  // alpha3: x^4 + z^157 x^3 + z^253 x^2 + z^56 x + z^16
  localparam coef_t ALPHA3 = alpha_coef(POLY_ZETA, 157, 253, 56, 16);

  // Word times alpha, alpha given by its coefficients and field polynomial.
  function automatic word_t mul_alpha(word_t y, coef_t c, logic [8:0] poly);
    byte_t t;
    t = y[31:24];
    return {y[23:16] ^ gf_mul(t, c[3], poly),
            y[15:8]  ^ gf_mul(t, c[2], poly),
            y[7:0]   ^ gf_mul(t, c[1], poly),
            gf_mul(t, c[0], poly)};
  endfunction

  function automatic word_t mul_alpha0(word_t y); return mul_alpha(y, ALPHA0, POLY_BETA);  endfunction
  function automatic word_t mul_alpha1(word_t y); return mul_alpha(y, ALPHA1, POLY_GAMMA); endfunction
  function automatic word_t mul_alpha2(word_t y); return mul_alpha(y, ALPHA2, POLY_DELTA); endfunction
  function automatic word_t mul_alpha3(word_t y); return mul_alpha(y, ALPHA3, POLY_ZETA);  endfunction

endpackage
