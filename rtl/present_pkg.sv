// present_pkg: PRESENT-80 building blocks shared by the protected PRESENT core.
//
// Standard PRESENT (Bogdanov et al., CHES 2007): 4-bit S-box, the 64-bit bit
// permutation P (bit i moves to 16*i mod 63, bit 63 stays) and their inverses.
// Nibble i of the 64-bit state is bits [4i+3:4i].
package present_pkg;

  typedef logic [3:0]  nib_t;
  typedef logic [63:0] pstate_t;

  localparam int unsigned NROUNDS = 31;

  localparam logic [63:0] SBOX_TAB = 64'h2174_8FE3_DA09_B65C; // S(x) = nibble x

  function automatic nib_t sbox(input nib_t x);
    return SBOX_TAB[4*x +: 4];
  endfunction

  function automatic nib_t inv_sbox(input nib_t y);
    nib_t r;
    r = '0;
    for (int x = 0; x < 16; x++) if (sbox(nib_t'(x)) == y) r = nib_t'(x);
    return r;
  endfunction

  function automatic pstate_t s_layer(input pstate_t s);
    pstate_t r;
    for (int i = 0; i < 16; i++) r[4*i +: 4] = sbox(s[4*i +: 4]);
    return r;
  endfunction

  function automatic int unsigned p_pos(input int unsigned i);
    return (i == 63) ? 63 : (16 * i) % 63;
  endfunction

  function automatic pstate_t perm(input pstate_t s);
    pstate_t r;
    for (int i = 0; i < 64; i++) r[p_pos(i)] = s[i];
    return r;
  endfunction

  function automatic pstate_t inv_perm(input pstate_t s);
    pstate_t r;
    for (int i = 0; i < 64; i++) r[i] = s[p_pos(i)];
    return r;
  endfunction

endpackage
