// tb_present_spec_ttest: specific leakage test of the protected PRESENT core
// in simulation, on the intermediate values of round 16, for all eight
// countermeasure settings.
//
// Random plaintexts under one fixed key. For every trace a reference model
// works out three sets of round-16 values, and each trace is sorted into two
// groups by each of 144 selection models:
//   group 1: S-layer output bit b            (64 models, bit = 1 vs bit = 0)
//   group 2: bit b of round input ^ output   (64 models)
//   group 3: S-box 0 output nibble == v      (16 models, v vs all others)
// "Round input" is the state at the start of round 16 and "round output"
// the state after its permutation, both unmasked.
//
// Power model, as in the fixed-versus-random bench: per clock cycle the
// Hamming distance of every update of the state register and of the register
// between the two function tables. Only the cycles of rounds 15 to 17 are
// kept (NS samples at most). Welch's t is computed per model and sample and
// compared with +/-4.5.
//
// Checked: without precharge every setting leaks in group 2 (the state
// register's update distance is the unmasked HW(in ^ out) whether or not the
// data is masked); with masking and precharge no model in any group exceeds
// the threshold. The other settings are only reported.
module tb_present_spec_ttest;
  import present_ref_pkg::*;
  localparam int NTR = 5000;   // traces per setting
  localparam int NS  = 16;     // samples kept per trace
  localparam int NM  = 144;    // selection models

  logic clk = 0, rst_n = 0, seed_load = 0, start = 0;
  logic [63:0] pt = '0, ct;
  logic [79:0] key = 80'h0123_4567_89AB_CDEF_0F1E;
  logic en_decomp = 0, en_mask = 0, en_pre = 0, busy, done;
  int checks = 0, failures = 0;

  real s [NM][2][NS];
  real q [NM][2][NS];
  int  n [NM][2];

  present_core dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(64'hC0FFEE),
                    .start(start), .plaintext(pt), .key(key), .en_decomp(en_decomp),
                    .en_mask(en_mask), .en_precharge(en_pre), .busy(busy),
                    .ciphertext(ct), .done(done));

  always #5 clk = ~clk;

  initial begin
    #500000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void clear_all();
    for (int m = 0; m < NM; m++)
      for (int g = 0; g < 2; g++) begin
        n[m][g] = 0;
        for (int i = 0; i < NS; i++) begin s[m][g][i] = 0.0; q[m][g][i] = 0.0; end
      end
  endfunction

  function automatic real t_of(input int m, input int i);
    real m0, m1, v0, v1, den;
    if (n[m][0] < 2 || n[m][1] < 2) return 0.0;
    m0 = s[m][0][i] / n[m][0];
    m1 = s[m][1][i] / n[m][1];
    v0 = (q[m][0][i] - n[m][0] * m0 * m0) / (n[m][0] - 1);
    v1 = (q[m][1][i] - n[m][1] * m1 * m1) / (n[m][1] - 1);
    if (v0 < 0.0) v0 = 0.0;
    if (v1 < 0.0) v1 = 0.0;
    den = v1 / n[m][1] + v0 / n[m][0];
    if (den <= 1.0e-12) return (m1 == m0) ? 0.0 : 1.0e9;
    return (m1 - m0) / $sqrt(den);
  endfunction

  // largest |t| over the models [lo, hi) and the first ns samples
  function automatic real max_t(input int lo, input int hi, input int ns);
    real mx, t;
    mx = 0.0;
    for (int m = lo; m < hi; m++)
      for (int i = 0; i < ns; i++) begin
        t = t_of(m, i);
        if (t < 0.0) t = -t;
        if (t > mx) mx = t;
      end
    return mx;
  endfunction

  // round-16 values of the reference cipher
  function automatic void round16(input logic [63:0] p, output logic [63:0] sout,
                                  output logic [63:0] io);
    logic [63:0] st, x;
    logic [79:0] k;
    st = p; k = key;
    for (int r = 1; r <= 15; r++) begin
      x = st ^ k[79:16];
      for (int b = 0; b < 16; b++) x[4*b +: 4] = S[x[4*b +: 4]];
      st = ref_perm(x);
      k = ref_key_update(k, r);
    end
    x = st ^ k[79:16];
    for (int b = 0; b < 16; b++) x[4*b +: 4] = S[x[4*b +: 4]];
    sout = x;
    io   = st ^ ref_perm(x);
  endfunction

  int ns_used;

  task automatic trace(input logic [63:0] p);
    logic [63:0] st_prev, mid_prev, sout, io;
    real lk [NS];
    int j, g;
    for (int i = 0; i < NS; i++) lk[i] = 0.0;
    pt = p;
    start = 1;
    st_prev = dut.state; mid_prev = dut.u_slayer.mid;
    @(negedge clk); start = 0;
    j = 0;
    while (!done) begin
      if (dut.round >= 5'd15 && dut.round <= 5'd17 && j < NS) begin
        lk[j] = real'($countones(dut.state ^ st_prev) + $countones(dut.u_slayer.mid ^ mid_prev));
        j++;
      end
      st_prev = dut.state; mid_prev = dut.u_slayer.mid;
      @(negedge clk);
    end
    ns_used = j;
    check(ct == ref_encrypt(p, key), "ciphertext");
    round16(p, sout, io);
    for (int m = 0; m < NM; m++) begin
      if (m < 64)       g = int'(sout[m]);
      else if (m < 128) g = int'(io[m - 64]);
      else              g = int'(sout[3:0] == 4'(m - 128));
      n[m][g]++;
      for (int i = 0; i < NS; i++) begin
        s[m][g][i] += lk[i];
        q[m][g][i] += lk[i] * lk[i];
      end
    end
  endtask

  initial begin
    real t1, t2, t3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed_load = 1; @(negedge clk); seed_load = 0;
    for (int mode = 0; mode < 8; mode++) begin
      {en_decomp, en_mask, en_pre} = 3'(mode);
      clear_all();
      for (int t = 0; t < NTR; t++) trace({$urandom, $urandom});
      t1 = max_t(0, 64, ns_used);
      t2 = max_t(64, 128, ns_used);
      t3 = max_t(128, 144, ns_used);
      $display("decomp=%0d mask=%0d precharge=%0d: max |t| S-box bits %0.2f, in^out bits %0.2f, S0 value %0.2f (%0d traces, %0d samples)",
               en_decomp, en_mask, en_pre, t1, t2, t3, NTR, ns_used);
      if (!en_pre)      check(t2 > 4.5, $sformatf("in^out leakage without precharge, mode %b", mode));
      else if (en_mask) check(t1 < 4.5 && t2 < 4.5 && t3 < 4.5,
                              $sformatf("no leakage with masking and precharge, mode %b", mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
