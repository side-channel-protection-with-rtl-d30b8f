// present_ref_pkg: plain PRESENT-80 reference model for the testbenches,
// written from the cipher specification independently of the RTL package.
package present_ref_pkg;
  localparam logic [3:0] S [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                    4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] ref_perm(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 63; i++) r[(i * 16) % 63] = s[i];
    r[63] = s[63];
    return r;
  endfunction

  function automatic logic [79:0] ref_key_update(input logic [79:0] k, input int rc);
    logic [79:0] r;
    for (int i = 0; i < 80; i++) r[(i + 61) % 80] = k[i];
    r[79:76] = S[r[79:76]];
    r[19:15] = r[19:15] ^ 5'(rc);
    return r;
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s;
    logic [79:0] k;
    s = pt; k = key;
    for (int r = 1; r <= 31; r++) begin
      s = s ^ k[79:16];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = S[s[4*n +: 4]];
      s = ref_perm(s);
      k = ref_key_update(k, r);
    end
    return s ^ k[79:16];
  endfunction
endpackage
