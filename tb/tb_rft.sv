// tb_rft: loads random 4x4 functions (random permutations and arbitrary
// tables) into a reconfigurable function table in exactly 16 cfg_en cycles and
// reads back all 16 inputs. A second, 8-input 2-output table (sixteen
// CFGLUT5 cells behind multiplexers) is loaded in 32 cycles with random
// contents and read back at all 256 inputs.
module tb_rft;
  logic clk = 0, cfg_en = 0;
  logic [3:0] cfg_din, x, y;
  int checks = 0, failures = 0;

  rft #(.OUT_W(4)) dut (.clk(clk), .cfg_en(cfg_en), .cfg_din(cfg_din), .x(x), .y(y));

  logic        cfg_en8 = 0;
  logic [15:0] cfg_din8 = '0;
  logic [7:0]  x8 = '0;
  logic [1:0]  y8;

  rft #(.IN_W(8), .OUT_W(2)) dut8 (.clk(clk), .cfg_en(cfg_en8), .cfg_din(cfg_din8), .x(x8), .y(y8));

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] tab [16];
    logic [3:0] t;
    int j;
    cfg_din = '0; x = '0;
    for (int n = 0; n < 8; n++) begin
      for (int a = 0; a < 16; a++) tab[a] = 4'(a);
      for (int a = 15; a > 0; a--) begin        // Fisher-Yates shuffle
        j = $urandom_range(a, 0);
        t = tab[a]; tab[a] = tab[j]; tab[j] = t;
      end
      if (n[0]) for (int a = 0; a < 16; a++) tab[a] = 4'($urandom);
      for (int a = 15; a >= 0; a--) begin
        @(negedge clk); cfg_en = 1; cfg_din = tab[a];
      end
      @(negedge clk); cfg_en = 0; cfg_din = 4'hF;
      @(negedge clk);
      for (int a = 0; a < 16; a++) begin
        x = 4'(a); #1;
        checks++;
        if (y !== tab[a]) begin
          failures++; $display("FAIL: table %0d x=%0d y=%h want %h", n, a, y, tab[a]);
        end
      end
    end
    begin
      logic [1:0] tab8 [256];
      for (int a = 0; a < 256; a++) tab8[a] = 2'($urandom);
      for (int e = 31; e >= 0; e--) begin
        @(negedge clk);
        cfg_en8 = 1;
        for (int j = 0; j < 2; j++)
          for (int l = 0; l < 8; l++) cfg_din8[j*8 + l] = tab8[32*l + e][j];
      end
      @(negedge clk); cfg_en8 = 0; cfg_din8 = '1;
      @(negedge clk);
      for (int a = 0; a < 256; a++) begin
        x8 = 8'(a); #1;
        checks++;
        if (y8 !== tab8[a]) begin
          failures++; $display("FAIL: 8-input table x=%0d y=%h want %h", a, y8, tab8[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
