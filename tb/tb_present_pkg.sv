// tb_present_pkg: checks present_pkg against the PRESENT specification.
// The S-box against the published table, S-box and bit-permutation inverses,
// and the permutation rule on single bits.
module tb_present_pkg;
  import present_pkg::*;

  int checks = 0, failures = 0;
  // published PRESENT S-box, entry for x = 0 first
  localparam logic [3:0] SPEC [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                       4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pstate_t s;
    for (int x = 0; x < 16; x++) begin
      check(sbox(4'(x)) == SPEC[x], $sformatf("sbox(%0d)", x));
      check(inv_sbox(SPEC[x]) == 4'(x), $sformatf("inv_sbox(%0d)", x));
    end
    check(perm(64'h1) == 64'h1, "P bit 0");
    check(perm(64'h2) == (64'h1 << 16), "P bit 1 -> 16");
    check(perm(64'h1 << 4) == (64'h1 << 1), "P bit 4 -> 1");
    check(perm(64'h1 << 63) == (64'h1 << 63), "P bit 63");
    check(perm(64'h1 << 62) == (64'h1 << 47), "P bit 62 -> 47");
    for (int t = 0; t < 20; t++) begin
      s = {$urandom, $urandom};
      check(inv_perm(perm(s)) == s, "inv_perm");
    end
    for (int t = 0; t < 20; t++) begin
      s = {$urandom, $urandom};
      check(s_layer(s) == {sbox(s[63:60]), sbox(s[59:56]), sbox(s[55:52]), sbox(s[51:48]),
                           sbox(s[47:44]), sbox(s[43:40]), sbox(s[39:36]), sbox(s[35:32]),
                           sbox(s[31:28]), sbox(s[27:24]), sbox(s[23:20]), sbox(s[19:16]),
                           sbox(s[15:12]), sbox(s[11:8]), sbox(s[7:4]), sbox(s[3:0])}, "s_layer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
