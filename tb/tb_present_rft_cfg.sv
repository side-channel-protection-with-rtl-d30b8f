// tb_present_rft_cfg: runs the table generator with random R1 permutations
// and masks,
// captures the 16-entry streams as the RFT shift chains would, and checks for
// every S-box position i and input v that
//   R2'_i(R1'_i(v ^ m1_i)) = S(v) ^ P^-1(m1)_i,
// that R1'_i is a bijection, that cfg_en lasts exactly 16 cycles, and that
// identity tables and zero masks give the identity and the plain S-box.
module tb_present_rft_cfg;
  import present_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0][15:0][3:0] r1;
  logic [63:0] m1, m2, cfg_r1, cfg_r2;
  logic busy, cfg_en, done;
  int checks = 0, failures = 0;

  present_rft_cfg dut (.clk(clk), .rst_n(rst_n), .start(start), .r1(r1),
                       .m1(m1), .m2(m2), .busy(busy), .cfg_en(cfg_en),
                       .cfg_r1(cfg_r1), .cfg_r2(cfg_r2), .done(done));

  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // inverse of the bit permutation, from the reference permutation
  function automatic logic [63:0] ref_inv_perm(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[i] = s[i == 63 ? 63 : (i * 16) % 63];
    return r;
  endfunction

  initial begin
    logic [3:0] t1 [16][16];
    logic [3:0] t2 [16][16];
    logic [63:0] om;
    logic [15:0] seen;
    int n, j;
    logic [3:0] tmp;
    for (int i = 0; i < 16; i++) for (int x = 0; x < 16; x++) r1[i][x] = 4'(x);
    m1 = '0; m2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      if (t != 0) begin
        for (int i = 0; i < 16; i++)
          for (int a = 15; a > 0; a--) begin
            j = $urandom_range(a, 0);
            tmp = r1[i][a]; r1[i][a] = r1[i][j]; r1[i][j] = tmp;
          end
        m1 = {$urandom, $urandom}; m2 = {$urandom, $urandom};
      end
      start = 1; @(negedge clk); start = 0;
      n = 0;
      while (cfg_en) begin
        // entry for address 15-n comes in cycle n
        for (int i = 0; i < 16; i++) begin
          t1[i][15 - n] = cfg_r1[4*i +: 4];
          t2[i][15 - n] = cfg_r2[4*i +: 4];
        end
        n++;
        @(negedge clk);
      end
      check(n == 16, $sformatf("16 configuration cycles (got %0d)", n));
      check(done == 1'b1, "done after the last entry");
      om = ref_inv_perm(m1);
      for (int i = 0; i < 16; i++) begin
        seen = '0;
        for (int v = 0; v < 16; v++) begin
          seen[t1[i][v]] = 1'b1;
          check(t2[i][t1[i][4'(v) ^ m1[4*i +: 4]]] == (S[v] ^ om[4*i +: 4]),
                $sformatf("composition, test %0d sbox %0d v %0d", t, i, v));
          if (t == 0) check(t1[i][v] == 4'(v) && t2[i][v] == S[v], "identity decomposition");
        end
        check(&seen, "R1' bijective");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
