// tb_aes_ttest: non-specific fixed-versus-random leakage test of the masked
// AES core in simulation, with and without register precharge, for each of
// the four memory primitives. Power model: per clock cycle, the Hamming
// distance of every update of the pre-S-box register and the sixteen table
// output registers. The testbench acts as host and draws fresh masks m, m'
// for every encryption; group 0 encrypts a fixed plaintext, group 1 random
// plaintexts, under one fixed key. Welch's t per cycle, threshold +/-4.5.
// Checked: without precharge the masked registers leak through
// HD(x^m, y^m) = HW(x^y); with precharge no first-order leakage shows in this
// model. The differences between memory primitives that show up on real
// devices are physical effects outside this register-level model; here all
// four must behave alike.
module tb_aes_ttest;
  import aes_pkg::*;
  localparam int NTR = 300;          // traces per group and setting

  logic clk = 0, rst_n = 0;
  logic [127:0] key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
  logic [3:0] fin;
  int ck [4];
  int fl [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the four cores take turns so that their traces do not overlap in time
  aes_ttest_unit #(.PRIM(PRIM_RAM32M),    .NTR(NTR)) u0 (.clk(clk), .rst_n(rst_n), .go(1'b1),   .key(key), .fin(fin[0]), .checks(ck[0]), .failures(fl[0]));
  aes_ttest_unit #(.PRIM(PRIM_RAM64M),    .NTR(NTR)) u1 (.clk(clk), .rst_n(rst_n), .go(fin[0]), .key(key), .fin(fin[1]), .checks(ck[1]), .failures(fl[1]));
  aes_ttest_unit #(.PRIM(PRIM_RAM256X1S), .NTR(NTR)) u2 (.clk(clk), .rst_n(rst_n), .go(fin[1]), .key(key), .fin(fin[2]), .checks(ck[2]), .failures(fl[2]));
  aes_ttest_unit #(.PRIM(PRIM_RAMB8BWER), .NTR(NTR)) u3 (.clk(clk), .rst_n(rst_n), .go(fin[2]), .key(key), .fin(fin[3]), .checks(ck[3]), .failures(fl[3]));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    for (int i = 0; i < 4; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
