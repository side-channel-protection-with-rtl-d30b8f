// tb_prng: compares a two-lane prng with an xorshift64 model written here,
// after a seed load, over 200 steps, and checks that it holds when next is low
// and that a zero seed does not lock it at zero.
module tb_prng;
  logic clk = 0, rst_n = 0, load = 0, next = 0;
  logic [63:0] seed = '0;
  logic [127:0] rnd;
  int checks = 0, failures = 0;

  prng #(.WIDTH(128)) dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .next(next), .rnd(rnd));

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] xs(input logic [63:0] s);
    logic [63:0] a;
    a = s;
    a = a ^ {a[50:0], 13'b0};
    a = a ^ {7'b0, a[63:7]};
    a = a ^ {a[46:0], 17'b0};
    return a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [63:0] l0, l1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed = 64'h0F1E_2D3C_4B5A_6978;
    load = 1; @(negedge clk); load = 0;
    l0 = seed ^ 64'h9E37_79B9_7F4A_7C15;
    l1 = seed ^ (64'h9E37_79B9_7F4A_7C15 * 2);
    check(rnd == {l1, l0}, "seeded state");
    next = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      l0 = xs(l0); l1 = xs(l1);
      check(rnd == {l1, l0}, "sequence");
    end
    next = 0;
    repeat (3) @(negedge clk);
    check(rnd == {l1, l0}, "hold");
    seed = 64'h9E37_79B9_7F4A_7C15;   // makes lane 0 zero
    load = 1; @(negedge clk); load = 0;
    check(rnd[63:0] != '0, "zero seed avoided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
