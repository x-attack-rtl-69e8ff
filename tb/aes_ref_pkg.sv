// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL: the S-box entry for a is found by
// searching for the b with a*b = 1 in GF(2^8) (a table is filled once by
// sbox_init), the state is handled as a 16-byte array, byte 0 being bits
// [127:120] of a block. Also gives the input byte of the last-round S-box
// on state byte 0, which the Trojan of the design taps.
package aes_ref_pkg;

  byte unsigned sbox_tab [256];
  bit           sbox_ready = 1'b0;

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b & 1) p ^= a;
      a = (a & 8'h80) ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void sbox_init();
    for (int a = 0; a < 256; a++) begin
      byte unsigned inv = 0;
      byte unsigned r;
      if (a != 0)
        for (int b = 1; b < 256; b++)
          if (gmul(8'(a), 8'(b)) == 1) inv = 8'(b);
      r = 8'h63;
      for (int i = 0; i < 8; i++) begin
        bit v = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
        r[i] = r[i] ^ v;
      end
      sbox_tab[a] = r;
    end
    sbox_ready = 1'b1;
  endfunction

  function automatic byte unsigned sbox(byte unsigned a);
    if (!sbox_ready) sbox_init();
    return sbox_tab[a];
  endfunction

  typedef byte unsigned st_t [16];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int k = 0; k < 16; k++) s[k] = b[127-8*k -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int k = 0; k < 16; k++) b[127-8*k -: 8] = s[k];
    return b;
  endfunction

  // Round keys 0..10 of AES-128.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    byte unsigned w [44][4];
    byte unsigned rc = 1;
    st_t k = to_st(key);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = k[4*i+j];
    for (int i = 4; i < 44; i++) begin
      byte unsigned t [4];
      for (int j = 0; j < 4; j++) t[j] = w[i-1][j];
      if (i % 4 == 0) begin
        byte unsigned t0 = t[0];
        t[0] = sbox(t[1]) ^ rc; t[1] = sbox(t[2]); t[2] = sbox(t[3]); t[3] = sbox(t0);
        rc = gmul(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++) begin
      st_t s;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s[4*i+j] = w[4*r+i][j];
      rk[r] = from_st(s);
    end
  endfunction

  // Encrypts pt; last_in returns the state entering the last round.
  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt,
                                            output logic [127:0] last_in);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(pt ^ rk[0]);
    last_in = '0;
    for (int r = 1; r <= 10; r++) begin
      if (r == 10) last_in = from_st(s);
      for (int k = 0; k < 16; k++) s[k] = sbox(s[k]);
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++)
        t[4*c+row] = s[4*((c+row)%4)+row];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          byte unsigned a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
          s[4*c]   = gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3);
          s[4*c+3] = gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2);
        end
      else s = t;
      s = to_st(from_st(s) ^ rk[r]);
    end
    return from_st(s);
  endfunction

  // One round: SubBytes, ShiftRows, MixColumns unless last, AddRoundKey.
  function automatic logic [127:0] round_ref(logic [127:0] st, logic [127:0] rk, bit last);
    st_t s, t;
    s = to_st(st);
    for (int k = 0; k < 16; k++) s[k] = sbox(s[k]);
    for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++)
      t[4*c+row] = s[4*((c+row)%4)+row];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        byte unsigned a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
        t[4*c]   = gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3);
        t[4*c+3] = gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2);
      end
    return from_st(t) ^ rk;
  endfunction

  function automatic logic [127:0] aes(logic [127:0] key, logic [127:0] pt);
    logic [127:0] li;
    return encrypt(key, pt, li);
  endfunction

  // Don't-care pair of the S-box on input a for output bit b: the design
  // selects between the two table halves with a[7].
  function automatic logic [1:0] sdc_pair(byte unsigned a, int b);
    byte unsigned s = sbox(a);
    return {a[7] & s[b], !a[7] & s[b]};   // {n1, n3}
  endfunction

endpackage
