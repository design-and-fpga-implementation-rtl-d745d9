// dvb_pkg -- types, constants and arithmetic shared by the DVB 16-QAM
// pragmatic-TCM modem.
//
// Contents:
//   * ptcm_rate_e    : the two inner-code rates of the modem, 3/4 (rate-1/2
//                      code, no puncturing) and 7/8 (punctured to 3/4).
//   * GF(2^8) helpers for the RS(204,188) code, field polynomial
//     p(x) = x^8+x^4+x^3+x^2+1 and primitive element 02h, as the DVB
//     standard fixes them; rs_gen() builds g(x) = prod_{i=0}^{15}(x+a^i)
//     at elaboration, so no coefficient table is stored.
//   * the K=7 convolutional code, G1 = 171 octal (output X) and
//     G2 = 133 octal (output Y).
//   * the 16-QAM levels of one axis in Fix(12,11), values +-3/sqrt(10) and
//     +-1/sqrt(10) as the encoder's mapper tables print them.
//   * the 15 distinct taps of the 29-tap square-root raised-cosine filter
//     (roll-off 0.35, 4 samples per symbol, 7-symbol span) and their
//     rounding to Fix(12,11); the receiver's level unit RX_AMP.
//
// srrc_tap() folds the tap index into 0..14, so only the low bits of its
// intermediate index are used, and conv_next() drops the oldest state bit,
// as a shift register does; lint tools report these bits as unused. They
// also report the constants as unused when the package is checked alone.
package dvb_pkg;

  typedef enum logic {RATE_3_4 = 1'b0, RATE_7_8 = 1'b1} ptcm_rate_e;

  typedef logic [7:0] byte_t;
  typedef logic signed [11:0] sample_t;

  // ---------------------------------------------------------------- GF(256)
  localparam logic [8:0] GF_POLY = 9'h11D;

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p;
    byte_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  // a^e for the primitive element a = 02h
  function automatic byte_t gf_alpha_pow(int e);
    byte_t r;
    r = 8'h01;
    for (int i = 0; i < (e % 255); i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // multiplicative inverse, x^254 by square-and-multiply (x = 0 gives 0)
  function automatic byte_t gf_inv(byte_t x);
    byte_t r;
    byte_t s;
    r = 8'h01;
    s = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  localparam int RS_2T = 16;

  typedef byte_t rs_gen_t [RS_2T+1];

  // g(x) = (x + a^0)(x + a^1)...(x + a^15); entry i holds the x^i coefficient
  function automatic rs_gen_t rs_gen();
    rs_gen_t g;
    rs_gen_t n;
    for (int i = 0; i <= RS_2T; i++) g[i] = '0;
    g[0] = 8'h01;
    for (int r = 0; r < RS_2T; r++) begin
      byte_t root;
      root = gf_alpha_pow(r);
      for (int i = 0; i <= RS_2T; i++) begin
        n[i] = gf_mul(g[i], root);
        if (i > 0) n[i] ^= g[i-1];
      end
      g = n;
    end
    return g;
  endfunction

  // ------------------------------------------------- convolutional code K=7
  localparam logic [6:0] CONV_G1 = 7'o171;  // output X
  localparam logic [6:0] CONV_G2 = 7'o133;  // output Y

  // state[5] is the most recent past input bit, state[0] the oldest
  function automatic logic [1:0] conv_xy(logic [5:0] state, logic u);
    logic [6:0] reg7;
    reg7 = {u, state};
    return {^(reg7 & CONV_G1), ^(reg7 & CONV_G2)};  // {X, Y}
  endfunction

  function automatic logic [5:0] conv_next(logic [5:0] state, logic u);
    return {u, state[5:1]};
  endfunction

  // ------------------------------------------------------------- 16-QAM
  localparam sample_t QAM_P3 = 12'sb011110010110;  //  3/sqrt(10)
  localparam sample_t QAM_P1 = 12'sb001010000111;  //  1/sqrt(10)
  localparam sample_t QAM_M1 = 12'sb110101111001;  // -1/sqrt(10)
  localparam sample_t QAM_M3 = 12'sb100001101010;  // -3/sqrt(10)

  // ------------------------------------------------------------ SRRC taps
  localparam int SRRC_L    = 4;    // samples per symbol
  localparam int SRRC_TAPS = 29;   // 7-symbol span, order 28
  // printed coefficients h[n], n = 0..14 (h[-n] = h[n]), in units of 1e-4
  localparam int SRRC_H [15] = '{5478, 4786, 3039, 1034, -423, -943, -676,
                                 -110, 286, 327, 128, -74, -127, -48, 48};

  // num / den rounded to nearest, halves away from zero (den > 0)
  function automatic int rdiv(int num, int den);
    return (num >= 0) ? (num + den / 2) / den : -((-num + den / 2) / den);
  endfunction

  // tap j (0..28) of the causal filter in Fix(12,11): h * 2048, rounded
  function automatic int srrc_tap(int j);
    int k;
    k = (j >= 14) ? (j - 14) : (14 - j);
    return rdiv(SRRC_H[k] * 2048, 10000);
  endfunction

  // 1/sqrt(10) in Sfix(12,9) LSBs (512/sqrt(10) = 161.9): the receiver's
  // unit level A, constellation points at +-A and +-3A
  localparam int RX_AMP = 162;

endpackage
