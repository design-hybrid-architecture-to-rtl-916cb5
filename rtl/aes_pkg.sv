// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 datapath.
//
// The 128-bit state is held as one vector in the FIPS-197 byte order: byte 0
// (the first input byte) sits in bits [127:120] and byte i holds state row
// i % 4, column i / 4. The S-box and its inverse are computed at elaboration
// time from the multiplicative inverse in GF(2^8) followed by the affine map,
// so no table of numbers is written out. The generator walks the field with
// powers of 3 (p) and of its inverse (q) together: q is then p^-1, and the
// S-box value of p is the affine transform of q. The same walk, storing p at
// that value, fills the inverse S-box.
package aes_pkg;

  localparam int unsigned NR         = 10;   // rounds of AES-128
  localparam int unsigned BLOCK_BITS = 128;

  typedef logic [7:0]              byte_t;
  typedef logic [BLOCK_BITS-1:0]   block_t;
  typedef logic [NR:0][BLOCK_BITS-1:0] round_keys_t;   // index 0 = first key used
  typedef byte_t sbox_t [256];

  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } aes_mode_e;

  // Multiply by x (i.e. by 2) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t acc = '0;
    byte_t aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = xtime(aa);
    end
    return acc;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // INVERSE = 0 gives the S-box, INVERSE = 1 its inverse, from the same walk.
  function automatic sbox_t gen_sbox(bit inverse);
    sbox_t t;
    byte_t p = 8'h01;
    byte_t q = 8'h01;
    byte_t s;
    if (inverse) t[8'h63] = 8'h00;      // 0 has no inverse: S(0) = affine(0)
    else         t[0]     = 8'h63;
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);                 // p *= 3
      q = q ^ {q[6:0], 1'b0};           // q /= 3 (multiply by 0xf6)
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'b0000};
      if (q[7]) q = q ^ 8'h09;
      s = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
      if (inverse) t[s] = p;
      else         t[p] = s;
    end
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox(1'b0);
  localparam sbox_t INV_SBOX = gen_sbox(1'b1);

  // Byte i of a state vector (FIPS-197 order).
  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

endpackage
