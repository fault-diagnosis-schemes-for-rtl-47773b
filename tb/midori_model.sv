// midori_model: behavioural reference of the Midori block cipher for the
// testbenches, written independently of the RTL (byte arrays, loops, no shared
// code). Cell 0 is the most significant cell of a 64- or 128-bit block. The
// model reproduces the published Midori64/Midori128 test vectors, which the
// core testbench checks.
package midori_model;

  typedef byte unsigned st_t [16];

  const byte unsigned SB0 [16] = '{8'hc, 8'ha, 8'hd, 8'h3, 8'he, 8'hb, 8'hf, 8'h7,
                                   8'h8, 8'h9, 8'h1, 8'h5, 8'h0, 8'h2, 8'h4, 8'h6};
  const byte unsigned SB1 [16] = '{8'h1, 8'h0, 8'h5, 8'h3, 8'he, 8'h2, 8'hf, 8'h7,
                                   8'hd, 8'ha, 8'h9, 8'hb, 8'hc, 8'h8, 8'h4, 8'h6};
  // Bit permutation of SSb_i, bit numbering x_0 = MSB.
  const int PERM [4][8] = '{'{4, 1, 6, 3, 0, 5, 2, 7}, '{1, 6, 7, 0, 5, 2, 3, 4},
                            '{2, 3, 4, 1, 6, 7, 0, 5}, '{7, 4, 1, 2, 3, 0, 5, 6}};
  const int SHUF [16] = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};
  // Round constants, one string of 16 cell bits per round, cell 0 first.
  const string CONST [19] = '{
    "0001010110110011", "0111100011000000", "1010010000110101", "0110001000010011",
    "0001000001001111", "1101000101110000", "0000001001100110", "0000101111001100",
    "1001010010000001", "0100000010111000", "0111000110010111", "0010001010001110",
    "0101000100110000", "1111100011001010", "1101111110010000", "0111110010000001",
    "0001110000100100", "0010001110110100", "0110001010001010"};

  function automatic int bitx(byte unsigned v, int k);  // x_k, k = 0 is the MSB
    return (v >> (7 - k)) & 1;
  endfunction

  // Position in the Sb1 pair (0..7, 0 = MSB of upper) fed by input bit x_k.
  function automatic int pair_pos(int idx, int k);
    for (int j = 0; j < 8; j++) if (PERM[idx][j] == k) return j;
    return -1;
  endfunction

  function automatic byte unsigned ssb(int idx, byte unsigned x);
    byte unsigned p, q, z;
    p = 0;
    for (int j = 0; j < 8; j++) p |= byte'(bitx(x, PERM[idx][j]) << (7 - j));
    q = byte'((SB1[p >> 4] << 4) | SB1[p & 15]);
    z = 0;
    for (int j = 0; j < 8; j++) z |= byte'(((q >> (7 - j)) & 1) << (7 - PERM[idx][j]));
    return z;
  endfunction

  function automatic st_t to_cells(logic [127:0] v, int cw);
    st_t s;
    for (int i = 0; i < 16; i++)
      s[i] = (cw == 8) ? v[8*(15-i) +: 8] : byte'(v[4*(15-i) +: 4]);
    return s;
  endfunction

  function automatic logic [127:0] from_cells(st_t s, int cw);
    logic [127:0] v = '0;
    for (int i = 0; i < 16; i++)
      if (cw == 8) v[8*(15-i) +: 8] = s[i];
      else         v[4*(15-i) +: 4] = s[i][3:0];
    return v;
  endfunction

  function automatic st_t sub_cell(st_t s, int cw);
    for (int i = 0; i < 16; i++) s[i] = (cw == 8) ? ssb(i % 4, s[i]) : SB0[s[i]];
    return s;
  endfunction

  function automatic st_t shuffle(st_t s);
    st_t r;
    for (int i = 0; i < 16; i++) r[i] = s[SHUF[i]];
    return r;
  endfunction

  function automatic st_t inv_shuffle(st_t s);
    st_t r;
    for (int i = 0; i < 16; i++) r[SHUF[i]] = s[i];
    return r;
  endfunction

  function automatic st_t mix(st_t s);
    st_t r;
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < 4; j++) begin
        r[4*c+j] = 0;
        for (int k = 0; k < 4; k++) if (k != j) r[4*c+j] ^= s[4*c+k];
      end
    return r;
  endfunction

  function automatic st_t xor_st(st_t a, st_t b);
    for (int i = 0; i < 16; i++) a[i] ^= b[i];
    return a;
  endfunction

  // Encryption round key RK_i.
  function automatic st_t round_key(logic [127:0] k, int i, int cw);
    st_t r;
    if (cw == 8) r = to_cells(k, 8);
    else         r = to_cells((i % 2 == 0) ? {64'h0, k[127:64]} : {64'h0, k[63:0]}, 4);
    for (int j = 0; j < 16; j++) r[j] ^= byte'(CONST[i][j] == "1");
    return r;
  endfunction

  function automatic st_t white_key(logic [127:0] k, int cw);
    return (cw == 8) ? to_cells(k, 8) : to_cells({64'h0, k[127:64] ^ k[63:0]}, 4);
  endfunction

  // Round key used in decryption round i: L^-1(RK_(R-2-i)).
  function automatic st_t dec_round_key(logic [127:0] k, int i, int cw);
    int r = (cw == 8) ? 20 : 16;
    return inv_shuffle(mix(round_key(k, r - 2 - i, cw)));
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] p, logic [127:0] k, int cw);
    int r = (cw == 8) ? 20 : 16;
    st_t s = xor_st(to_cells(p, cw), white_key(k, cw));
    for (int i = 0; i < r - 1; i++)
      s = xor_st(mix(shuffle(sub_cell(s, cw))), round_key(k, i, cw));
    s = xor_st(sub_cell(s, cw), white_key(k, cw));
    return from_cells(s, cw);
  endfunction

  // Decryption computed as the literal inverse of encryption.
  function automatic logic [127:0] decrypt(logic [127:0] c, logic [127:0] k, int cw);
    int r = (cw == 8) ? 20 : 16;
    st_t s = sub_cell(xor_st(to_cells(c, cw), white_key(k, cw)), cw);
    for (int i = r - 2; i >= 0; i--)
      s = sub_cell(inv_shuffle(mix(xor_st(s, round_key(k, i, cw)))), cw);
    s = xor_st(s, white_key(k, cw));
    return from_cells(s, cw);
  endfunction

endpackage
