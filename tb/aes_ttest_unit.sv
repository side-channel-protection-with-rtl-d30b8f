// aes_ttest_unit: one masked AES core under a simulated fixed-versus-random
// leakage test (see tb_aes_ttest). Waits for go, runs 2 x NTR traces without
// and then with precharge, and raises fin. Hamming-distance power model of
// the pre-S-box register and the table output registers.
module aes_ttest_unit
  import aes_pkg::*;
#(
  parameter prim_e PRIM = PRIM_RAM32M,
  parameter int    NTR  = 300
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         go,
  input  logic [127:0] key,
  output logic         fin,
  output int           checks,
  output int           failures
);
  localparam int DEPTH = prim_depth(PRIM);
  localparam int NS    = 320;
  localparam int P     = int'(PRIM);

  logic         seed_load = 0, start = 0, en_pre = 0, busy, done;
  logic [127:0] pt_m = '0, m = '0, mp = '0, om = '0, ct_m;
  logic [127:0] pre_w, q_w;

  aes_core #(.PRIM(PRIM)) dut (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(64'(P + 7)),
    .start(start), .plaintext_m(pt_m), .key(key), .m(m), .m_prime(mp), .om(om),
    .en_precharge(en_pre), .busy(busy), .ciphertext_m(ct_m), .done(done)
  );

  ttest_acc #(.NS(NS)) acc ();

  assign pre_w = dut.pre;
  assign q_w   = dut.sb_out;

  function automatic block_t ref_encrypt(input block_t pt, input block_t k0);
    block_t s, k;
    k = k0;
    s = pt ^ k;
    for (int r = 1; r <= 10; r++) begin
      k = next_round_key(k, rcon_of(4'(r - 1)));
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

  task automatic trace(input int g, input block_t pt);
    block_t pre_prev, q_prev;
    int i;
    m  = {$urandom, $urandom, $urandom, $urandom};
    mp = {$urandom, $urandom, $urandom, $urandom};
    om = inv_shift_rows(inv_mix_columns(m ^ mp));
    pt_m = pt ^ m ^ mp;
    start = 1;
    pre_prev = pre_w; q_prev = q_w;
    @(negedge clk); start = 0;
    i = 0;
    while (!done) begin
      acc.add_sample(g, i, real'($countones(pre_w ^ pre_prev) + $countones(q_w ^ q_prev)));
      pre_prev = pre_w; q_prev = q_w;
      i++;
      @(negedge clk);
    end
    acc.end_trace(g);
    if (g == 1) begin
      checks++;
      if ((ct_m ^ inv_mix_columns(m ^ mp) ^ mp) != ref_encrypt(pt, key)) begin
        failures++; $display("FAIL: primitive %0d ciphertext", P);
      end
    end
  endtask

  initial begin
    block_t fixed_pt;
    real tmax;
    int g;
    fixed_pt = 128'h00112233_44556677_8899aabb_ccddeeff;
    fin = 0; checks = 0; failures = 0;
    wait (go && rst_n);
    @(negedge clk);
    seed_load = 1; @(negedge clk); seed_load = 0;
    for (int pre = 0; pre < 2; pre++) begin
      en_pre = (pre != 0);
      acc.clear();
      for (int t = 0; t < 2 * NTR; t++) begin
        g = (acc.n[0] >= NTR) ? 1 : (acc.n[1] >= NTR) ? 0 : int'($urandom_range(1, 0));
        trace(g, (g != 0) ? block_t'({$urandom, $urandom, $urandom, $urandom}) : fixed_pt);
      end
      tmax = acc.max_abs_t(DEPTH + ((pre != 0) ? 43 : 23));
      $display("primitive %0d (DEPTH %0d) precharge=%0d: max |t| = %0.2f over %0d traces per group",
               P, DEPTH, pre, tmax, NTR);
      checks++;
      if ((pre != 0) ? (tmax >= 4.5) : (tmax <= 4.5)) begin
        failures++;
        $display("FAIL: primitive %0d precharge %0d: unexpected t-test outcome", P, pre);
      end
    end
    fin = 1;
  end
endmodule
