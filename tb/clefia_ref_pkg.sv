// clefia_ref_pkg: bit-exact software model of CLEFIA for the testbenches.
//
// It follows the cipher's definition directly, without T-boxes: F0/F1 apply
// the S-boxes and then multiply by the diffusion matrices M0/M1 in GF(2^8);
// the 4- and 8-branch Feistel networks rotate their words after every round
// but the last.  It also runs the key schedule that the host performs for
// the core: the constants CON_i come from the 16-bit sequence
// T_{i+1} = T_i * x^-1 in GF(2^16) (polynomial z^16+z^15+z^13+z^11+z^5+z^4+1)
// with CON_2i = (T_i ^ 0xb7e1) | (~T_i <<< 1) and
// CON_2i+1 = (~T_i ^ 0x243f) | (T_i <<< 8), seeded with 0x428a, 0x7137 and
// 0xb5c0 for 128/192/256-bit keys.  Only the S-box tables are shared with
// the design package; the published test vectors check them.
package clefia_ref_pkg;
  import clefia_pkg::*;

  typedef word_t rk_arr_t [52];
  typedef word_t wk_arr_t [4];
  typedef word_t con_arr_t [92];

  function automatic byte_t ref_mul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1d) : (a << 1);
    end
    return p;
  endfunction

  function automatic word_t ref_f(bit sel, word_t rk, word_t x);
    byte_t t [4], s [4], y [4];
    byte_t m [4][4];
    word_t v;
    v = rk ^ x;
    for (int i = 0; i < 4; i++) t[i] = v[31-8*i -: 8];
    if (!sel) begin
      m = '{'{1, 2, 4, 6}, '{2, 1, 6, 4}, '{4, 6, 1, 2}, '{6, 4, 2, 1}};
      s = '{sbox0(t[0]), sbox1(t[1]), sbox0(t[2]), sbox1(t[3])};
    end else begin
      m = '{'{1, 8, 2, 10}, '{8, 1, 10, 2}, '{2, 10, 1, 8}, '{10, 2, 8, 1}};
      s = '{sbox1(t[0]), sbox0(t[1]), sbox1(t[2]), sbox0(t[3])};
    end
    for (int i = 0; i < 4; i++) begin
      y[i] = 0;
      for (int j = 0; j < 4; j++) y[i] ^= ref_mul(m[i][j], s[j]);
    end
    return {y[0], y[1], y[2], y[3]};
  endfunction

  function automatic con_arr_t ref_con(logic [15:0] iv, int n);
    con_arr_t c;
    logic [15:0] t, nt;
    t = iv;
    for (int i = 0; i < 92; i++) c[i] = 0;
    for (int i = 0; i < n / 2; i++) begin
      nt = ~t;
      c[2*i]   = {t ^ 16'hb7e1, nt[14:0], nt[15]};
      c[2*i+1] = {nt ^ 16'h243f, t[7:0], t[15:8]};
      t = t[0] ? (((t ^ 16'ha831) >> 1) | 16'h8000) : (t >> 1);
    end
    return c;
  endfunction

  // GFN_{d,r} of the key schedule (d = 4 or 8 branches), no whitening
  function automatic void ref_gfn(int d, int r, const ref con_arr_t c, ref word_t x [8]);
    word_t t;
    for (int i = 0; i < r; i++) begin
      for (int j = 0; j < d / 2; j++)
        x[2*j+1] ^= ref_f(j[0], c[(d/2)*i + j], x[2*j]);
      if (i != r - 1) begin
        t = x[0];
        for (int j = 0; j < d - 1; j++) x[j] = x[j+1];
        x[d-1] = t;
      end
    end
  endfunction

  function automatic block_t sigma(block_t x);
    return {x[120:64], x[6:0], x[127:121], x[63:7]};
  endfunction

  // Key schedule. key holds K0..K7 in key[255:0] (K0 at the top); for a
  // 128-bit key only key[255:128] is used, for 192 only key[255:64].
  function automatic void ref_keysched(keysize_e ks, logic [255:0] key,
                                       output wk_arr_t wk, output rk_arr_t rk,
                                       output int r);
    con_arr_t c;
    word_t    x [8];
    word_t    k [8];
    block_t   l, ll, lr, kk, kl, kr, t;
    for (int i = 0; i < 8; i++) k[i] = key[255-32*i -: 32];
    for (int i = 0; i < 52; i++) rk[i] = 0;
    if (ks == KEY128) begin
      r = 18;
      c = ref_con(16'h428a, 60);
      for (int i = 0; i < 8; i++) x[i] = (i < 4) ? k[i] : 0;
      ref_gfn(4, 12, c, x);
      l  = {x[0], x[1], x[2], x[3]};
      kk = key[255:128];
      for (int i = 0; i < 4; i++) wk[i] = k[i];
      for (int i = 0; i < 9; i++) begin
        t = l ^ {c[24+4*i], c[25+4*i], c[26+4*i], c[27+4*i]};
        l = sigma(l);
        if (i % 2 == 1) t ^= kk;
        for (int j = 0; j < 4; j++) rk[4*i+j] = t[127-32*j -: 32];
      end
    end else begin
      int n;
      if (ks == KEY192) begin
        r = 22; n = 11;
        k[6] = ~k[0];
        k[7] = ~k[1];
        c = ref_con(16'h7137, 84);
      end else begin
        r = 26; n = 13;
        c = ref_con(16'hb5c0, 92);
      end
      x = k;
      ref_gfn(8, 10, c, x);
      ll = {x[0], x[1], x[2], x[3]};
      lr = {x[4], x[5], x[6], x[7]};
      kl = {k[0], k[1], k[2], k[3]};
      kr = {k[4], k[5], k[6], k[7]};
      for (int i = 0; i < 4; i++) wk[i] = k[i] ^ k[i+4];
      for (int i = 0; i < n; i++) begin
        if (i % 4 < 2) begin
          t  = ll ^ {c[40+4*i], c[41+4*i], c[42+4*i], c[43+4*i]};
          ll = sigma(ll);
          if (i % 2 == 1) t ^= kr;
        end else begin
          t  = lr ^ {c[40+4*i], c[41+4*i], c[42+4*i], c[43+4*i]};
          lr = sigma(lr);
          if (i % 2 == 1) t ^= kl;
        end
        for (int j = 0; j < 4; j++) rk[4*i+j] = t[127-32*j -: 32];
      end
    end
  endfunction

  function automatic block_t ref_encrypt(wk_arr_t wk, rk_arr_t rk,
                                         int r, block_t p);
    word_t t [4];
    word_t s;
    for (int i = 0; i < 4; i++) t[i] = p[127-32*i -: 32];
    t[1] ^= wk[0];
    t[3] ^= wk[1];
    for (int i = 0; i < r; i++) begin
      t[1] ^= ref_f(0, rk[2*i], t[0]);
      t[3] ^= ref_f(1, rk[2*i+1], t[2]);
      if (i != r - 1) begin
        s = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = s;
      end
    end
    return {t[0], t[1] ^ wk[2], t[2], t[3] ^ wk[3]};
  endfunction

  function automatic block_t ref_decrypt(wk_arr_t wk, rk_arr_t rk,
                                         int r, block_t c);
    word_t t [4];
    word_t s;
    for (int i = 0; i < 4; i++) t[i] = c[127-32*i -: 32];
    t[1] ^= wk[2];
    t[3] ^= wk[3];
    for (int i = 0; i < r; i++) begin
      t[1] ^= ref_f(0, rk[2*(r-i)-2], t[0]);
      t[3] ^= ref_f(1, rk[2*(r-i)-1], t[2]);
      if (i != r - 1) begin
        s = t[3]; t[3] = t[2]; t[2] = t[1]; t[1] = t[0]; t[0] = s;
      end
    end
    return {t[0], t[1] ^ wk[0], t[2], t[3] ^ wk[1]};
  endfunction

endpackage
