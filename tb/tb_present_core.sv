// tb_present_core: encrypts the published PRESENT-80 test vectors and random
// blocks under all eight combinations of decomposition, masking and
// precharge, compares with the reference model, and checks the latency
// (98 cycles from start to done, 160 with precharge).
module tb_present_core;
  import present_ref_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0, start = 0;
  logic [63:0] seed = 64'h1234_5678_9ABC_DEF0, pt = '0, ct;
  logic [79:0] key = '0;
  logic en_decomp = 0, en_mask = 0, en_pre = 0, busy, done;
  int checks = 0, failures = 0;

  present_core dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed),
                    .start(start), .plaintext(pt), .key(key), .en_decomp(en_decomp),
                    .en_mask(en_mask), .en_precharge(en_pre), .busy(busy),
                    .ciphertext(ct), .done(done));

  always #5 clk = ~clk;

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [63:0] p, input logic [79:0] k, input logic [2:0] mode,
                     input logic [63:0] want);
    int cyc;
    pt = p; key = k; {en_decomp, en_mask, en_pre} = mode;
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(ct == want, $sformatf("ciphertext mode %b: got %h want %h", mode, ct, want));
    check(cyc == (mode[0] ? 160 : 98), $sformatf("latency mode %b: %0d", mode, cyc));
  endtask

  initial begin
    logic [63:0] p;
    logic [79:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed_load = 1; @(negedge clk); seed_load = 0;
    for (int mode = 0; mode < 8; mode++) begin
      run(64'h0, 80'h0, 3'(mode), 64'h5579C1387B228445);
      run(64'h0, '1, 3'(mode), 64'hE72C46C0F5945049);
      run('1, 80'h0, 3'(mode), 64'hA112FFC72F68417B);
      run('1, '1, 3'(mode), 64'h3333DCD3213210D2);
      for (int t = 0; t < 3; t++) begin
        p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom};
        run(p, k, 3'(mode), ref_encrypt(p, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
