// tb_aes_core: masked AES-128 encryptions for every memory primitive, with
// and without register precharge. The testbench plays the host: it draws
// masks m and m', supplies p ^ m ^ m' and om = SR^-1(MC^-1(m ^ m')), and
// unmasks the result with MC^-1(m ^ m') ^ m'. Checked against the FIPS-197
// vectors and against a reference built from the (separately tested) package
// functions; the start-to-done latency must be DEPTH + 24 cycles without
// precharge and DEPTH + 44 with it.
module tb_aes_core;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [3:0] finished = '0;

  always #5 clk = ~clk;

  initial begin
    #4000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  function automatic block_t ref_encrypt(input block_t pt, input block_t key);
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

  for (genvar p = 0; p < 4; p++) begin : g_prim
    localparam prim_e PRIM  = prim_e'(p);
    localparam int    DEPTH = prim_depth(PRIM);
    logic         seed_load = 0, start = 0, en_pre = 0, busy, done;
    logic [127:0] pt_m = '0, key = '0, m = '0, mp = '0, om = '0, ct_m;

    aes_core #(.PRIM(PRIM)) dut (
      .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(64'(p + 1)),
      .start(start), .plaintext_m(pt_m), .key(key), .m(m), .m_prime(mp), .om(om),
      .en_precharge(en_pre), .busy(busy), .ciphertext_m(ct_m), .done(done)
    );

    task automatic run(input block_t pt, input block_t k, input bit pre, input block_t want);
      int cyc;
      block_t c;
      m  = {$urandom, $urandom, $urandom, $urandom};
      mp = {$urandom, $urandom, $urandom, $urandom};
      om = inv_shift_rows(inv_mix_columns(m ^ mp));
      pt_m = pt ^ m ^ mp; key = k; en_pre = pre;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      c = ct_m ^ inv_mix_columns(m ^ mp) ^ mp;
      checks++;
      if (c !== want) begin
        failures++; $display("FAIL: prim %0d pre %0d got %h want %h", p, pre, c, want);
      end
      checks++;
      if (cyc != DEPTH + (pre ? 44 : 24)) begin
        failures++; $display("FAIL: prim %0d pre %0d latency %0d", p, pre, cyc);
      end
    endtask

    initial begin
      block_t pt, k;
      @(posedge rst_n);
      seed_load = 1; @(negedge clk); seed_load = 0;
      for (int pre = 0; pre < 2; pre++) begin
        run(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c,
            pre[0], 128'h3925841d_02dc09fb_dc118597_196a0b32);
        run(128'h00112233_44556677_8899aabb_ccddeeff, 128'h00010203_04050607_08090a0b_0c0d0e0f,
            pre[0], 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);
        for (int t = 0; t < 2; t++) begin
          pt = {$urandom, $urandom, $urandom, $urandom};
          k  = {$urandom, $urandom, $urandom, $urandom};
          run(pt, k, pre[0], ref_encrypt(pt, k));
        end
      end
      finished[p] = 1'b1;
    end
  end

  initial begin
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
