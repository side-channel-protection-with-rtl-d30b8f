// aes_pkg: AES-128 arithmetic shared by the masked AES core and its helpers.
//
// The cipher itself is standard AES-128 (FIPS-197); the protected design only
// changes where the S-box lives (in randomized look-up tables) and how masks
// flow. The state is a 128-bit vector with byte 0 in bits [127:120]; byte i
// sits in row i%4, column i/4, as in FIPS-197. The S-box is computed, not
// tabulated: multiplicative inverse in GF(2^8) (x^254) followed by the affine
// map with constant 8'h63. All functions are combinational and synthesizable.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NROUNDS = 10;

  // Memory primitive a randomized look-up table is built from. Only the depth
  // of one primitive matters to the RTL: it sets how many banks a 256-entry
  // table has, and so how many cycles a reload takes (one entry per bank per
  // cycle). RAM32M: 32 deep, RAM64M: 64 deep, RAM256X1S: 256 deep x 1 bit
  // (eight side by side), RAMB8BWER: one block RAM, 256 x 8 used.
  typedef enum logic [1:0] {
    PRIM_RAM32M, PRIM_RAM64M, PRIM_RAM256X1S, PRIM_RAMB8BWER
  } prim_e;

  function automatic int unsigned prim_depth(input prim_e p);
    case (p)
      PRIM_RAM32M: return 32;
      PRIM_RAM64M: return 64;
      default:     return 256;
    endcase
  endfunction

  function automatic int unsigned clog2_depth(input prim_e p);
    case (p)
      PRIM_RAM32M: return 5;
      PRIM_RAM64M: return 6;
      default:     return 8;
    endcase
  endfunction

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254 = a^-1 (and 0 -> 0).
  function automatic byte_t ginv(input byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // exponent 254 = bits 1..7 set
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t get_byte(input block_t s, input int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  // Byte at (row r, column c) moves to column c - r.
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = get_byte(s, 4*c + row);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      r[127 - 8*(4*c + 1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      r[127 - 8*(4*c + 2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      r[127 - 8*(4*c + 3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
    return r;
  endfunction

  // One step of the AES-128 key expansion: round key i -> round key i+1.
  function automatic block_t next_round_key(input block_t k, input byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Round constant following round key i (i = 0..9).
  function automatic byte_t rcon_of(input logic [3:0] i);
    byte_t r;
    r = 8'h01;
    for (int j = 0; j < 10; j++) if (j < int'(i)) r = xtime(r);
    return r;
  endfunction

endpackage
