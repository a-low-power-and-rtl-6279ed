// aes_ref_pkg: reference AES-128 encryption for the testbenches.
//
// It plays the software half of the co-design (key expansion, AddRoundKey,
// ShiftRows, MixColumns) and supplies expected values. Its S-Box is computed
// differently from the RTL ROM: the inverse is found by searching for the b
// with a*b = 1 in GF(2^8), and the affine map is applied bit by bit as
//   s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,  c = 8'h63,
// indices modulo 8. Block layout as in the RTL: byte k in bits [127-8k -: 8],
// state row r, column c is byte r + 4c.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 7; i >= 0; i--) begin
      p = ref_xtime(p);
      if (b[i]) p ^= a;
    end
    return p;
  endfunction

  // Entries already worked out, so long runs do not repeat the search.
  logic [7:0] sbox_memo [256];
  bit         sbox_memo_ok [256] = '{default: 1'b0};

  function automatic logic [7:0] sbox_ref(logic [7:0] a);
    if (!sbox_memo_ok[a]) begin
      sbox_memo[a]    = sbox_compute(a);
      sbox_memo_ok[a] = 1'b1;
    end
    return sbox_memo[a];
  endfunction

  function automatic logic [7:0] sbox_compute(logic [7:0] a);
    logic [7:0] inv = '0;
    logic [7:0] c = 8'h63;
    logic [7:0] s;
    for (int b = 1; b < 256; b++)
      if (a != 0 && ref_mul(a, 8'(b)) == 8'h01) inv = 8'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic logic [7:0] get_byte(blk_t b, int k);
    return b[127-8*k -: 8];
  endfunction

  function automatic blk_t sub_bytes_ref(blk_t b);
    blk_t r;
    for (int k = 0; k < 16; k++) r[127-8*k -: 8] = sbox_ref(get_byte(b, k));
    return r;
  endfunction

  function automatic blk_t shift_rows_ref(blk_t b);
    blk_t r;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        r[127-8*(row+4*col) -: 8] = get_byte(b, row + 4*((col+row)%4));
    return r;
  endfunction

  function automatic blk_t mix_columns_ref(blk_t b);
    blk_t r;
    for (int col = 0; col < 4; col++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = get_byte(b, 4*col);   a1 = get_byte(b, 4*col+1);
      a2 = get_byte(b, 4*col+2); a3 = get_byte(b, 4*col+3);
      r[127-8*(4*col)   -: 8] = ref_mul(a0,2) ^ ref_mul(a1,3) ^ a2 ^ a3;
      r[127-8*(4*col+1) -: 8] = a0 ^ ref_mul(a1,2) ^ ref_mul(a2,3) ^ a3;
      r[127-8*(4*col+2) -: 8] = a0 ^ a1 ^ ref_mul(a2,2) ^ ref_mul(a3,3);
      r[127-8*(4*col+3) -: 8] = ref_mul(a0,3) ^ a1 ^ a2 ^ ref_mul(a3,2);
    end
    return r;
  endfunction

  // Round keys 0..10 of AES-128, rk[i] in bits [128*i +: 128].
  function automatic logic [11*128-1:0] expand_key_ref(blk_t key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon = 8'h01;
    logic [11*128-1:0] rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_ref(t[31:24]), sbox_ref(t[23:16]), sbox_ref(t[15:8]), sbox_ref(t[7:0])};
        t[31:24] ^= rcon;
        rcon = ref_xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++)
      rk[128*r +: 128] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t encrypt_ref(blk_t pt, blk_t key);
    logic [11*128-1:0] rk = expand_key_ref(key);
    blk_t s = pt ^ rk[0 +: 128];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows_ref(sub_bytes_ref(s));
      if (r != 10) s = mix_columns_ref(s);
      s ^= rk[128*r +: 128];
    end
    return s;
  endfunction

endpackage
