// tb_sca_top: end-to-end test of both protected ciphers at the top level,
// with every parameter at its default. The AES and PRESENT cores run at the
// same time. AES: host-side masking with fresh m, m' per block, with and
// without precharge. PRESENT: all eight countermeasure settings. Every result
// is compared with known-answer vectors or a reference model. The testbench
// also counts how often each mechanism of the design acted and fails if one
// never did: AES table reloads, AES precharge loads, the last-round
// MixColumns bypass, masked AES outputs that differ from the plain
// ciphertext, PRESENT table reloads, non-identity S-box decompositions,
// nonzero PRESENT masks, and PRESENT precharge loads.
module tb_sca_top;
  import aes_pkg::*;
  import present_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic aes_seed_load = 0, aes_start = 0, aes_pre = 0, aes_busy, aes_done;
  logic [127:0] aes_pt_m = '0, aes_key = '0, aes_m = '0, aes_mp = '0, aes_om = '0, aes_ct_m;
  logic pr_seed_load = 0, pr_start = 0, pr_dec = 0, pr_mask = 0, pr_pre = 0, pr_busy, pr_done;
  logic [63:0] pr_pt = '0, pr_ct;
  logic [79:0] pr_key = '0;
  int checks = 0, failures = 0;
  bit aes_fin = 0, pr_fin = 0;

  int n_aes_reload = 0, n_aes_pre = 0, n_aes_bypass = 0, n_aes_masked = 0;
  int n_pr_reload = 0, n_pr_decomp = 0, n_pr_mask = 0, n_pr_pre = 0;

  sca_top dut (
    .clk(clk), .rst_n(rst_n),
    .aes_seed_load(aes_seed_load), .aes_seed(64'hA5A5_0000_1234_5678), .aes_start(aes_start),
    .aes_plaintext_m(aes_pt_m), .aes_key(aes_key), .aes_m(aes_m), .aes_m_prime(aes_mp),
    .aes_om(aes_om), .aes_en_precharge(aes_pre), .aes_busy(aes_busy),
    .aes_ciphertext_m(aes_ct_m), .aes_done(aes_done),
    .pr_seed_load(pr_seed_load), .pr_seed(64'h0BAD_F00D_CAFE_0001), .pr_start(pr_start),
    .pr_plaintext(pr_pt), .pr_key(pr_key), .pr_en_decomp(pr_dec), .pr_en_mask(pr_mask),
    .pr_en_precharge(pr_pre), .pr_busy(pr_busy), .pr_ciphertext(pr_ct), .pr_done(pr_done)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters, observed inside the design
  always @(posedge clk) begin
    if (dut.u_aes.cfg_we && !dut.u_aes.u_cfg.busy) failures++;       // write outside reload
    if (dut.u_aes.u_cfg.done) n_aes_reload++;
    if (dut.u_aes.q_pre) n_aes_pre++;
    if (dut.u_aes.done && dut.u_aes.fb == dut.u_aes.sr_out &&
        mix_columns(dut.u_aes.sr_out) != dut.u_aes.sr_out) n_aes_bypass++;
    if (dut.u_present.u_cfg.done) begin
      n_pr_reload++;
      begin
        bit ident;
        ident = 1;
        for (int i = 0; i < 16; i++)
          for (int x = 0; x < 16; x++) if (dut.u_present.r1[i][x] != 4'(x)) ident = 0;
        if (!ident) n_pr_decomp++;
      end
      if (dut.u_present.m1 != '0 && dut.u_present.m2 != '0) n_pr_mask++;
    end
    if (dut.u_present.mid_pre) n_pr_pre++;
  end

  function automatic block_t aes_ref(input block_t pt, input block_t key);
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

  // AES side
  initial begin
    block_t pt, k, want, c;
    @(posedge rst_n);
    @(negedge clk); aes_seed_load = 1; @(negedge clk); aes_seed_load = 0;
    for (int t = 0; t < 6; t++) begin
      if (t == 0) begin
        pt = 128'h3243f6a8_885a308d_313198a2_e0370734;
        k  = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
      end else begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        k  = {$urandom, $urandom, $urandom, $urandom};
      end
      want = aes_ref(pt, k);
      if (t == 0) check(want == 128'h3925841d_02dc09fb_dc118597_196a0b32, "AES reference");
      aes_m  = {$urandom, $urandom, $urandom, $urandom};
      aes_mp = {$urandom, $urandom, $urandom, $urandom};
      aes_om = inv_shift_rows(inv_mix_columns(aes_m ^ aes_mp));
      aes_pt_m = pt ^ aes_m ^ aes_mp; aes_key = k; aes_pre = t[0];
      aes_start = 1; @(negedge clk); aes_start = 0;
      while (!aes_done) @(negedge clk);
      c = aes_ct_m ^ inv_mix_columns(aes_m ^ aes_mp) ^ aes_mp;
      check(c == want, $sformatf("AES block %0d", t));
      if (aes_ct_m != want) n_aes_masked++;
    end
    aes_fin = 1;
  end

  // PRESENT side
  initial begin
    logic [63:0] p;
    logic [79:0] k;
    @(posedge rst_n);
    @(negedge clk); pr_seed_load = 1; @(negedge clk); pr_seed_load = 0;
    for (int mode = 0; mode < 8; mode++) begin
      for (int t = 0; t < 2; t++) begin
        if (t == 0) begin p = '0; k = '0; end
        else begin p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom}; end
        pr_pt = p; pr_key = k; {pr_dec, pr_mask, pr_pre} = 3'(mode);
        pr_start = 1; @(negedge clk); pr_start = 0;
        while (!pr_done) @(negedge clk);
        check(pr_ct == ref_encrypt(p, k), $sformatf("PRESENT mode %b block %0d", mode, t));
        if (t == 0) check(pr_ct == 64'h5579C1387B228445, "PRESENT known answer");
      end
    end
    pr_fin = 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (aes_fin && pr_fin);
    $display("mechanisms: aes_reload=%0d aes_precharge=%0d aes_mc_bypass=%0d aes_masked_out=%0d",
             n_aes_reload, n_aes_pre, n_aes_bypass, n_aes_masked);
    $display("mechanisms: pr_reload=%0d pr_decomp=%0d pr_mask=%0d pr_precharge=%0d",
             n_pr_reload, n_pr_decomp, n_pr_mask, n_pr_pre);
    check(n_aes_reload == 6, "AES tables reloaded before every block");
    check(n_aes_pre > 0, "AES precharge happened");
    check(n_aes_bypass == 6, "AES last-round MixColumns bypass in every block");
    check(n_aes_masked == 6, "AES output is masked");
    check(n_pr_reload == 16, "PRESENT tables reloaded before every block");
    check(n_pr_decomp == 8, "PRESENT random decomposition in the four decomposition modes");
    check(n_pr_mask == 8, "PRESENT masks in the four masking modes");
    check(n_pr_pre > 0, "PRESENT precharge happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
