// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is found by brute-force search
// for each byte's multiplicative inverse followed by the affine map written
// bit by bit, the state is an array of 16 bytes, and decryption follows the
// straightforward inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey,
// InvMixColumns) with the plain round keys. Call init() once before use.
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 state_t [16];

  localparam u8 AFFINE_C = 8'h63;

  u8 sbox [256];
  u8 isbox [256];
  bit ready = 0;

  function automatic u8 mul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic void init();
    for (int x = 0; x < 256; x++) begin
      u8 inv = 0;
      u8 s;
      for (int y = 1; y < 256; y++) if (mul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ AFFINE_C[i];
      sbox[x] = s;
      isbox[s] = u8'(x);
    end
    ready = 1;
  endfunction

  function automatic state_t to_state(logic [127:0] v);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(state_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  // Round keys w[0..43] as 11 128-bit keys.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox[t[31:24]], sbox[t[23:16]], sbox[t[15:8]], sbox[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic state_t sub(state_t s, bit inv);
    for (int i = 0; i < 16; i++) s[i] = inv ? isbox[s[i]] : sbox[s[i]];
    return s;
  endfunction

  function automatic state_t shift(state_t s, bit inv);
    state_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r + 4*c] = s[r + 4*((c + r) % 4)];
        else      o[r + 4*((c + r) % 4)] = s[r + 4*c];
    return o;
  endfunction

  function automatic state_t mix(state_t s, bit inv);
    state_t o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = s[4*c], a1 = s[4*c+1], a2 = s[4*c+2], a3 = s[4*c+3];
      if (!inv) begin
        o[4*c]   = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
        o[4*c+1] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
        o[4*c+2] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
        o[4*c+3] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
      end else begin
        o[4*c]   = mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9);
        o[4*c+1] = mul(a0,9)  ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13);
        o[4*c+2] = mul(a0,13) ^ mul(a1,9)  ^ mul(a2,14) ^ mul(a3,11);
        o[4*c+3] = mul(a0,11) ^ mul(a1,13) ^ mul(a2,9)  ^ mul(a3,14);
      end
    end
    return o;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    state_t s;
    expand(key, rk);
    s = to_state(pt ^ rk[0]);
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub(s, 0), 0);
      if (r != 10) s = mix(s, 0);
      s = to_state(from_state(s) ^ rk[r]);
    end
    return from_state(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    state_t s;
    expand(key, rk);
    s = to_state(ct ^ rk[10]);
    for (int r = 9; r >= 0; r--) begin
      s = sub(shift(s, 1), 1);
      s = to_state(from_state(s) ^ rk[r]);
      if (r != 0) s = mix(s, 1);
    end
    return from_state(s);
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
