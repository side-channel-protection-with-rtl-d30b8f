// tb_present_ttest: non-specific fixed-versus-random leakage test of the
// protected PRESENT core in simulation, for all eight countermeasure
// settings. Power model: per clock cycle, the Hamming distance of every
// update of the two S-layer registers (the state register and the register
// between the two function tables), observed inside the core. Group 0
// encrypts a fixed plaintext, group 1 random plaintexts, both under one fixed
// key, interleaved at random; the test statistic is Welch's t per cycle with
// the usual +/-4.5 threshold.
// Checked with this model: every setting without precharge leaks (masking
// alone leaves HD(x^m, y^m) = HW(x^y)), and masking combined with precharge
// shows no first-order leakage. Precharge without masking is only reported:
// the plaintext load into the state register is not precharged, so it
// still leaks there unless the plaintext is masked. The model captures only
// register Hamming distance, not glitches or the slice effects of real
// devices.
module tb_present_ttest;
  import present_ref_pkg::*;
  localparam int NTR = 600;          // traces per group and setting
  localparam int NS  = 176;

  logic clk = 0, rst_n = 0, seed_load = 0, start = 0;
  logic [63:0] pt = '0, ct;
  logic [79:0] key = 80'h0123_4567_89AB_CDEF_0F1E;
  logic en_decomp = 0, en_mask = 0, en_pre = 0, busy, done;
  int checks = 0, failures = 0;

  present_core dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(64'h5EED),
                    .start(start), .plaintext(pt), .key(key), .en_decomp(en_decomp),
                    .en_mask(en_mask), .en_precharge(en_pre), .busy(busy),
                    .ciphertext(ct), .done(done));

  ttest_acc #(.NS(NS)) acc ();

  always #5 clk = ~clk;

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one trace: leakage of each cycle from start to done
  task automatic trace(input int g, input logic [63:0] p);
    logic [63:0] st_prev, mid_prev;
    int i;
    pt = p;
    start = 1;
    st_prev = dut.state; mid_prev = dut.u_slayer.mid;
    @(negedge clk); start = 0;
    i = 0;
    while (!done) begin
      acc.add_sample(g, i, real'($countones(dut.state ^ st_prev) +
                                 $countones(dut.u_slayer.mid ^ mid_prev)));
      st_prev = dut.state; mid_prev = dut.u_slayer.mid;
      i++;
      @(negedge clk);
    end
    acc.end_trace(g);
    if (g == 1) check(ct == ref_encrypt(p, key), "ciphertext");
  endtask

  initial begin
    logic [63:0] fixed_pt = 64'hDEAD_BEEF_0BAD_F00D;
    real tmax;
    int g;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed_load = 1; @(negedge clk); seed_load = 0;
    for (int mode = 0; mode < 8; mode++) begin
      {en_decomp, en_mask, en_pre} = 3'(mode);
      acc.clear();
      for (int t = 0; t < 2 * NTR; t++) begin
        g = (acc.n[0] >= NTR) ? 1 : (acc.n[1] >= NTR) ? 0 : int'($urandom_range(1, 0));
        trace(g, g ? {$urandom, $urandom} : fixed_pt);
      end
      tmax = acc.max_abs_t(en_pre ? 159 : 97);
      $display("decomp=%0d mask=%0d precharge=%0d: max |t| = %0.2f over %0d traces per group",
               en_decomp, en_mask, en_pre, tmax, NTR);
      if (!en_pre)             check(tmax > 4.5, $sformatf("leakage detected without precharge, mode %b", mode));
      else if (en_mask)        check(tmax < 4.5, $sformatf("no leakage detected, mode %b", mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
