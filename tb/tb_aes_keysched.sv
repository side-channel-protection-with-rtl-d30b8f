// tb_aes_keysched: walks the FIPS-197 Appendix A key through all ten steps
// with a random key mask m' and checks the first, second and last round keys
// against the published values, plus that the output is always k ^ m'.
module tb_aes_keysched;
  logic clk = 0, rst_n = 0, first = 0, step = 0;
  logic [127:0] key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, m_prime, rk_m;
  logic [3:0] round = '0;
  int checks = 0, failures = 0;

  aes_keysched dut (.clk(clk), .rst_n(rst_n), .first(first), .key(key), .step(step),
                    .round(round), .m_prime(m_prime), .rk_masked(rk_m));

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    m_prime = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    first = 1; @(negedge clk); first = 0;
    check((rk_m ^ m_prime) == key, "round key 0");
    for (int r = 0; r < 10; r++) begin
      round = 4'(r); step = 1; @(negedge clk); step = 0;
      if (r == 0) check((rk_m ^ m_prime) == 128'ha0fafe17_88542cb1_23a33939_2a6c7605, "round key 1");
      if (r == 1) check((rk_m ^ m_prime) == 128'hf2c295f2_7a96b943_5935807a_7359f67f, "round key 2");
      m_prime = {$urandom, $urandom, $urandom, $urandom};
    end
    @(negedge clk);
    check((rk_m ^ m_prime) == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "round key 10");
    step = 0; repeat (2) @(negedge clk);
    check((rk_m ^ m_prime) == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "hold without step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
