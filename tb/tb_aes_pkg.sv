// tb_aes_pkg: checks the AES-128 functions of aes_pkg against FIPS-197.
// S-box spot values and bijectivity, the MixColumns example column, inverse
// pairs, the key expansion (last round key of the Appendix A key) and two
// complete encryptions built only from the package functions.
module tb_aes_pkg;
  import aes_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic block_t encrypt(input block_t pt, input block_t key);
    block_t s, k;
    k = key;
    s = pt ^ k;
    for (int r = 1; r <= 10; r++) begin
      k = next_round_key(k, rcon_of(4'(r - 1)));
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

  initial begin
    bit [255:0] seen;
    block_t x, k;
    check(sbox(8'h00) == 8'h63, "sbox(00)");
    check(sbox(8'h53) == 8'hed, "sbox(53)");
    check(sbox(8'hff) == 8'h16, "sbox(ff)");
    check(sbox(8'h01) == 8'h7c, "sbox(01)");
    seen = '0;
    for (int i = 0; i < 256; i++) seen[sbox(8'(i))] = 1'b1;
    check(&seen, "sbox bijective");
    x = {8'hdb, 8'h13, 8'h53, 8'h45, 96'h0};
    check(mix_columns(x)[127:96] == 32'h8e4da1bc, "mixcolumns example");
    for (int t = 0; t < 20; t++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      check(inv_mix_columns(mix_columns(x)) == x, "inv mixcolumns");
      check(inv_shift_rows(shift_rows(x)) == x, "inv shiftrows");
    end
    x = 128'h00112233_44556677_8899aabb_ccddeeff;
    check(shift_rows(x) == 128'h0055aaff_4499ee33_88dd2277_cc1166bb, "shiftrows");
    k = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    for (int r = 0; r < 10; r++) k = next_round_key(k, rcon_of(4'(r)));
    check(k == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "key expansion round 10");
    check(encrypt(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c)
          == 128'h3925841d_02dc09fb_dc118597_196a0b32, "FIPS-197 appendix B");
    check(encrypt(128'h00112233_44556677_8899aabb_ccddeeff, 128'h00010203_04050607_08090a0b_0c0d0e0f)
          == 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, "FIPS-197 appendix C.1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
