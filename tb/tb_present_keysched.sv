// tb_present_keysched: loads random 80-bit keys and compares all 32 round keys
// with the reference key schedule.
module tb_present_keysched;
  import present_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [79:0] key_in = '0;
  logic [4:0] rc = '0;
  logic [63:0] rk;
  int checks = 0, failures = 0;

  present_keysched dut (.clk(clk), .rst_n(rst_n), .load(load), .key_in(key_in),
                        .step(step), .rc(rc), .rk(rk));

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      k = (t == 0) ? '0 : (t == 1) ? '1 : {$urandom, $urandom, $urandom};
      key_in = k; load = 1; @(negedge clk); load = 0;
      for (int r = 1; r <= 32; r++) begin
        checks++;
        if (rk !== k[79:16]) begin
          failures++; $display("FAIL: key %0d round %0d", t, r);
        end
        if (r < 32) begin
          rc = 5'(r); step = 1; @(negedge clk); step = 0;
          k = ref_key_update(k, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
