// tb_present_slayer: loads masked decomposed tables (computed here) into the
// sixteen RFT pairs, then pushes random masked inputs through R1', the middle
// register and R2', checking the unmasked S-layer output, that the middle
// register never holds R1' of the unmasked value with mask 0 when m2 is not
// zero, and that a precharge load puts the random value into the register.
module tb_present_slayer;
  import present_ref_pkg::*;
  logic clk = 0, rst_n = 0, cfg_en = 0, mid_load = 0, mid_pre = 0;
  logic [63:0] cfg_r1 = '0, cfg_r2 = '0, x = '0, mid_rnd = '0, mid, y;
  int checks = 0, failures = 0;

  present_slayer dut (.clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_r1(cfg_r1),
                      .cfg_r2(cfg_r2), .x(x), .mid_load(mid_load), .mid_pre(mid_pre),
                      .mid_rnd(mid_rnd), .mid(mid), .y(y));

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

  initial begin
    logic [3:0] r1 [16][16];
    logic [3:0] r1i [16][16];
    logic [3:0] t, a_m1, a_m2, a_om;
    logic [63:0] m1, m2, om, v, want;
    int j;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      m1 = {$urandom, $urandom}; m2 = {$urandom, $urandom}; om = {$urandom, $urandom};
      for (int i = 0; i < 16; i++) begin
        for (int a = 0; a < 16; a++) r1[i][a] = 4'(a);
        for (int a = 15; a > 0; a--) begin
          j = $urandom_range(a, 0);
          t = r1[i][a]; r1[i][a] = r1[i][j]; r1[i][j] = t;
        end
        for (int a = 0; a < 16; a++) r1i[i][r1[i][a]] = 4'(a);
      end
      for (int a = 15; a >= 0; a--) begin
        @(negedge clk);
        cfg_en = 1;
        for (int i = 0; i < 16; i++) begin
          a_m1 = m1[4*i +: 4]; a_m2 = m2[4*i +: 4]; a_om = om[4*i +: 4];
          cfg_r1[4*i +: 4] = r1[i][4'(a) ^ a_m1] ^ a_m2;
          cfg_r2[4*i +: 4] = S[r1i[i][4'(a) ^ a_m2]] ^ a_om;
        end
      end
      @(negedge clk); cfg_en = 0;
      for (int k = 0; k < 20; k++) begin
        v = {$urandom, $urandom};
        x = v ^ m1;
        mid_rnd = {$urandom, $urandom};
        mid_load = 1; mid_pre = 1; @(negedge clk);
        check(mid == mid_rnd, "precharge value");
        mid_pre = 0; @(negedge clk); mid_load = 0;
        for (int i = 0; i < 16; i++) want[4*i +: 4] = S[v[4*i +: 4]];
        check((y ^ om) == want, "masked S-layer output");
        for (int i = 0; i < 16; i++)
          check(mid[4*i +: 4] == (r1[i][v[4*i +: 4]] ^ m2[4*i +: 4]), "middle register holds R1(v)^m2");
        x = '1; @(negedge clk);
        check((y ^ om) == want, "output held while mid_load low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
