// clefia_pkg: types, constants and table functions shared by the Type-II
// CLEFIA core.
//
// The core keeps the CLEFIA data path in two pipeline stages and reuses one
// merged F-function for both F0 and F1.  This package holds:
//   * the word and configuration types,
//   * the layout of the expanded-key memory (whitening keys at addresses 0..3,
//     round key RK_i at address 4+i; this layout is a choice of this design),
//   * the CLEFIA S-boxes: S0 is built from its four 4-bit S-boxes and the
//     GF(2^4) mixing step of the CLEFIA definition, S1 is given as its
//     256-entry table (S1(x) = g(f(x)^-1) in GF(2^8), affine maps f and g),
//   * the merged T-box contents.  A T-box folds an S-box and one column of
//     the diffusion matrix M0 or M1 into one 8-bit -> 32-bit table:
//        table 0 (bytes 0 and 2): F0 -> (S0, 2*S0, 4*S0, 6*S0)
//                                 F1 -> (S1, 8*S1, 2*S1, A*S1)
//        table 1 (bytes 1 and 3): F0 -> (2*S1, S1, 6*S1, 4*S1)
//                                 F1 -> (8*S0, S0, A*S0, 2*S0)
//     with products in GF(2^8) modulo z^8+z^4+z^3+z^2+1.  Bytes 2 and 3 use
//     the same tables rotated by 16 bits,
//   * the schedule function step_info(), which gives for each half-round
//     step which F-function runs, which keys it reads and which register it
//     updates (see clefia_ctrl).
package clefia_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Key size, which sets the number of rounds (18, 22 or 26).
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } keysize_e;

  localparam int unsigned KEY_ADDR_W = 6;            // 64 words: 4 WK + up to 52 RK
  localparam int unsigned WK_BASE    = 0;
  localparam int unsigned RK_BASE    = 4;
  localparam int unsigned STEP_W     = 6;            // counts up to 2*26-1

  typedef logic [KEY_ADDR_W-1:0] key_addr_t;
  typedef logic [STEP_W-1:0]     step_t;

  // Per-step control word, computed once when a step enters the pipeline
  // and carried along with it.
  typedef struct packed {
    logic      fsel;       // 0: F0, 1: F1
    key_addr_t rk_addr;    // round key read for this step
    logic      wk_en;      // first or last round: whitening key is added
    key_addr_t wk_addr;    // whitening key address
    logic [1:0] in_slot;   // register holding the F-function input
    logic [1:0] tgt_slot;  // register updated by this step
    logic [1:0] off;       // rotation offset of the round (logical T0 slot)
    logic       penult;    // step 2r-2
    logic       last;      // step 2r-1
  } step_info_t;

  function automatic int unsigned rounds_of(keysize_e ks);
    case (ks)
      KEY192:  return 22;
      KEY256:  return 26;
      default: return 18;
    endcase
  endfunction

  // Step n of a block (n = 0 .. 2r-1) is half of round k = n/2.
  // Encryption runs F0 then F1 in every round.  Decryption rotates the four
  // branches the other way; it runs F0 first in even rounds and F1 first in
  // odd rounds, which keeps every F input the result of the step two before.
  // Branch words are never moved: logical branch j of round k lives in
  // register (j + k) mod 4 when encrypting, (j - k) mod 4 when decrypting.
  function automatic step_info_t step_info(step_t n, logic dec, keysize_e ks);
    step_info_t  s;
    int unsigned r, k, rk_idx;
    logic [1:0]  off;
    logic        last_round;
    r          = rounds_of(ks);
    k          = int'(n) / 2;
    s.fsel     = dec ? (n[0] ^ k[0]) : n[0];
    off        = dec ? 2'(-k) : 2'(k);
    s.off      = off;
    s.in_slot  = (s.fsel ? 2'd2 : 2'd0) + off;
    s.tgt_slot = (s.fsel ? 2'd3 : 2'd1) + off;
    rk_idx     = dec ? 2 * (r - 1 - k) + int'(s.fsel) : 2 * k + int'(s.fsel);
    s.rk_addr  = key_addr_t'(RK_BASE + rk_idx);
    last_round = (k == r - 1);
    s.wk_en    = (k == 0) || last_round;
    // enc: WK0/WK1 at the start, WK2/WK3 at the end; dec: the reverse
    s.wk_addr  = key_addr_t'(WK_BASE + ((last_round ^ dec) ? 2 : 0) + int'(s.fsel));
    s.penult   = (int'(n) == 2 * r - 2);
    s.last     = (int'(n) == 2 * r - 1);
    return s;
  endfunction

  // 4-bit S-boxes SS0..SS3 used to build S0.
  localparam logic [3:0] SS0 [16] = '{4'he, 4'h6, 4'hc, 4'ha, 4'h8, 4'h7, 4'h2, 4'hf,
                                      4'hb, 4'h1, 4'h4, 4'h0, 4'h5, 4'h9, 4'hd, 4'h3};
  localparam logic [3:0] SS1 [16] = '{4'h6, 4'h4, 4'h0, 4'hd, 4'h2, 4'hb, 4'ha, 4'h3,
                                      4'h9, 4'hc, 4'he, 4'hf, 4'h8, 4'h7, 4'h5, 4'h1};
  localparam logic [3:0] SS2 [16] = '{4'hb, 4'h8, 4'h5, 4'he, 4'ha, 4'h6, 4'h4, 4'hc,
                                      4'hf, 4'h7, 4'h2, 4'h3, 4'h1, 4'h0, 4'hd, 4'h9};
  localparam logic [3:0] SS3 [16] = '{4'ha, 4'h2, 4'h6, 4'hd, 4'h3, 4'h4, 4'h5, 4'he,
                                      4'h0, 4'h7, 4'h8, 4'h9, 4'hb, 4'hf, 4'hc, 4'h1};

  localparam byte_t S1_TABLE [256] = '{
    8'h6c, 8'hda, 8'hc3, 8'he9, 8'h4e, 8'h9d, 8'h0a, 8'h3d, 8'hb8, 8'h36, 8'hb4, 8'h38, 8'h13, 8'h34, 8'h0c, 8'hd9,
    8'hbf, 8'h74, 8'h94, 8'h8f, 8'hb7, 8'h9c, 8'he5, 8'hdc, 8'h9e, 8'h07, 8'h49, 8'h4f, 8'h98, 8'h2c, 8'hb0, 8'h93,
    8'h12, 8'heb, 8'hcd, 8'hb3, 8'h92, 8'he7, 8'h41, 8'h60, 8'he3, 8'h21, 8'h27, 8'h3b, 8'he6, 8'h19, 8'hd2, 8'h0e,
    8'h91, 8'h11, 8'hc7, 8'h3f, 8'h2a, 8'h8e, 8'ha1, 8'hbc, 8'h2b, 8'hc8, 8'hc5, 8'h0f, 8'h5b, 8'hf3, 8'h87, 8'h8b,
    8'hfb, 8'hf5, 8'hde, 8'h20, 8'hc6, 8'ha7, 8'h84, 8'hce, 8'hd8, 8'h65, 8'h51, 8'hc9, 8'ha4, 8'hef, 8'h43, 8'h53,
    8'h25, 8'h5d, 8'h9b, 8'h31, 8'he8, 8'h3e, 8'h0d, 8'hd7, 8'h80, 8'hff, 8'h69, 8'h8a, 8'hba, 8'h0b, 8'h73, 8'h5c,
    8'h6e, 8'h54, 8'h15, 8'h62, 8'hf6, 8'h35, 8'h30, 8'h52, 8'ha3, 8'h16, 8'hd3, 8'h28, 8'h32, 8'hfa, 8'haa, 8'h5e,
    8'hcf, 8'hea, 8'hed, 8'h78, 8'h33, 8'h58, 8'h09, 8'h7b, 8'h63, 8'hc0, 8'hc1, 8'h46, 8'h1e, 8'hdf, 8'ha9, 8'h99,
    8'h55, 8'h04, 8'hc4, 8'h86, 8'h39, 8'h77, 8'h82, 8'hec, 8'h40, 8'h18, 8'h90, 8'h97, 8'h59, 8'hdd, 8'h83, 8'h1f,
    8'h9a, 8'h37, 8'h06, 8'h24, 8'h64, 8'h7c, 8'ha5, 8'h56, 8'h48, 8'h08, 8'h85, 8'hd0, 8'h61, 8'h26, 8'hca, 8'h6f,
    8'h7e, 8'h6a, 8'hb6, 8'h71, 8'ha0, 8'h70, 8'h05, 8'hd1, 8'h45, 8'h8c, 8'h23, 8'h1c, 8'hf0, 8'hee, 8'h89, 8'had,
    8'h7a, 8'h4b, 8'hc2, 8'h2f, 8'hdb, 8'h5a, 8'h4d, 8'h76, 8'h67, 8'h17, 8'h2d, 8'hf4, 8'hcb, 8'hb1, 8'h4a, 8'ha8,
    8'hb5, 8'h22, 8'h47, 8'h3a, 8'hd5, 8'h10, 8'h4c, 8'h72, 8'hcc, 8'h00, 8'hf9, 8'he0, 8'hfd, 8'he2, 8'hfe, 8'hae,
    8'hf8, 8'h5f, 8'hab, 8'hf1, 8'h1b, 8'h42, 8'h81, 8'hd6, 8'hbe, 8'h44, 8'h29, 8'ha6, 8'h57, 8'hb9, 8'haf, 8'hf2,
    8'hd4, 8'h75, 8'h66, 8'hbb, 8'h68, 8'h9f, 8'h50, 8'h02, 8'h01, 8'h3c, 8'h7f, 8'h8d, 8'h1a, 8'h88, 8'hbd, 8'hac,
    8'hf7, 8'he4, 8'h79, 8'h96, 8'ha2, 8'hfc, 8'h6d, 8'hb2, 8'h6b, 8'h03, 8'he1, 8'h2e, 8'h7d, 8'h14, 8'h95, 8'h1d
  };

  // multiply by x in GF(2^4), polynomial z^4+z+1
  function automatic logic [3:0] gf4_x2(logic [3:0] a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
  endfunction

  function automatic byte_t sbox0(byte_t x);
    logic [3:0] t0, t1, u0, u1;
    t0 = SS0[x[7:4]];
    t1 = SS1[x[3:0]];
    u0 = t0 ^ gf4_x2(t1);
    u1 = gf4_x2(t0) ^ t1;
    return {SS2[u0], SS3[u1]};
  endfunction

  function automatic byte_t sbox1(byte_t x);
    return S1_TABLE[x];
  endfunction

  // product in GF(2^8), polynomial z^8+z^4+z^3+z^2+1
  function automatic byte_t gf8_mul(byte_t a, byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1d : 8'h00);
    end
    return p;
  endfunction

  // Entry of merged T-box TABLE (0: bytes 0/2, 1: bytes 1/3) at the 9-bit
  // address {fsel, byte}.
  function automatic word_t tbox_entry(int unsigned table_id, logic [8:0] addr);
    byte_t s;
    logic  fsel;
    fsel = addr[8];
    // table 0 uses S0 for F0 and S1 for F1; table 1 the other way round
    s = ((table_id == 0) ^ fsel) ? sbox0(addr[7:0]) : sbox1(addr[7:0]);
    if (table_id == 0)
      return fsel ? {s, gf8_mul(8'h08, s), gf8_mul(8'h02, s), gf8_mul(8'h0a, s)}
                  : {s, gf8_mul(8'h02, s), gf8_mul(8'h04, s), gf8_mul(8'h06, s)};
    else
      return fsel ? {gf8_mul(8'h08, s), s, gf8_mul(8'h0a, s), gf8_mul(8'h02, s)}
                  : {gf8_mul(8'h02, s), s, gf8_mul(8'h06, s), gf8_mul(8'h04, s)};
  endfunction

  function automatic word_t rot16(word_t w);
    return {w[15:0], w[31:16]};
  endfunction

endpackage
