// tb_present_r1_gen: runs the R1 shuffle many times with random bytes and
// checks that every table is a permutation of 0..15, that shuffle low leaves
// the identity, that busy lasts 15 cycles, and that over 400 runs every value
// shows up at every position of table 0 (a coarse uniformity check).
module tb_present_r1_gen;
  logic clk = 0, rst_n = 0, start = 0, shuffle = 0, busy, done;
  logic [127:0] rnd = '0;
  logic [15:0][15:0][3:0] r1;
  int checks = 0, failures = 0;
  int hist [16][16];

  present_r1_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .shuffle(shuffle),
                      .rnd(rnd), .busy(busy), .r1(r1), .done(done));

  always #5 clk = ~clk;
  always @(negedge clk) rnd <= {$urandom, $urandom, $urandom, $urandom};

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit [15:0] seen;
    bit ident, all;
    int cyc;
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) hist[a][b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 420; t++) begin
      shuffle = (t % 21 != 5);
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (busy) begin cyc++; @(negedge clk); end
      check(cyc == 15 && done, $sformatf("15 busy cycles (got %0d)", cyc));
      ident = 1;
      for (int i = 0; i < 16; i++) begin
        seen = '0;
        for (int x = 0; x < 16; x++) begin
          seen[r1[i][x]] = 1'b1;
          if (r1[i][x] != 4'(x)) ident = 0;
        end
        check(&seen, "table is a permutation");
      end
      if (!shuffle) check(ident, "identity when shuffle is low");
      else begin
        check(!ident, "shuffled tables differ from the identity");
        for (int x = 0; x < 16; x++) hist[x][r1[0][x]]++;
      end
    end
    all = 1;
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) if (hist[a][b] == 0) all = 0;
    check(all, "every value reached every position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
