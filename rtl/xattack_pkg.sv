// xattack_pkg: types, constants and AES helper functions shared by the
// X-attack demonstrator.
//
// The attack-mode and Trojan-variant encodings are this design's own
// choice; the mode names (periodic, half, all) and the three Trojan variants
// follow the attack description. The AES helpers are the standard
// FIPS-197 arithmetic in GF(2^8) with the polynomial x^8+x^4+x^3+x+1; the
// S-box is computed here as the multiplicative inverse (x^254) followed by
// the affine transform, so no table has to be typed in.
package xattack_pkg;

  // RO-bank control mode selected by the host for the next attack run.
  typedef enum logic [1:0] {
    MODE_PERIODIC = 2'd0,  // both enables in phase, ~75 % duty
    MODE_HALF     = 2'd1,  // only bank 1 enabled
    MODE_ALL      = 2'd2   // both banks enabled continuously
  } attack_mode_e;

  // SDC Trojan variants.
  typedef enum logic [1:0] {
    TROJAN_1 = 2'd0,  // trigger pair registered as is, fires on (1,1)
    TROJAN_2 = 2'd1,  // inverted-polarity triggers, multiplexer inputs swapped
    TROJAN_3 = 2'd2   // Trojan-2 on the slowed pair t1 = s1&s2 | x&y, t2 = s1&s2 | ~x&y
  } trojan_variant_e;

  localparam int unsigned AES_ROUNDS = 10;
  localparam int unsigned AES_BITS   = 128;

  typedef logic [AES_BITS-1:0] block_t;

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8) (shift and add).
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // AES S-box: inverse as a^254 (square-and-multiply), then the affine map.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, sq, r;
    inv = 8'h01;
    sq  = a;
    // 254 = 0b11111110
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);          // a^(2^i)
      inv = gf_mul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // One half of the S-box table, 128 entries packed into 1024 bits.
  // HALF=0 holds S(0x00..0x7f), HALF=1 holds S(0x80..0xff); entry i sits at
  // bits [8*i +: 8].
  function automatic logic [1023:0] sbox_half_table(input logic half);
    logic [1023:0] t;
    for (int i = 0; i < 128; i++)
      t[8*i +: 8] = sbox_calc({half, 7'(i)});
    return t;
  endfunction

  // Round constant of AES-128 key expansion round r (1..10).
  function automatic logic [7:0] rcon(input int unsigned r);
    logic [7:0] c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // MixColumns on one 32-bit column, byte 0 in bits [31:24].
  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

endpackage
