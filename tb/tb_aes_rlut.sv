// tb_aes_rlut: one randomized look-up table per memory primitive. Each is
// filled with a random 256-byte table through its bank write port (DEPTH
// cycles, all banks in parallel), then read at all 256 addresses through the
// output register; a precharge load must return the random byte instead.
module tb_aes_rlut;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  logic [3:0] finished = '0;

  for (genvar p = 0; p < 4; p++) begin : g_prim
    localparam prim_e PRIM  = prim_e'(p);
    localparam int    DEPTH = prim_depth(PRIM);
    localparam int    LW    = clog2_depth(PRIM);
    localparam int    NBANK = 256 / DEPTH;
    logic          we = 0, q_load = 0, q_pre = 0;
    logic [LW-1:0] wa [NBANK];
    logic [7:0]    wd [NBANK];
    logic [7:0]    addr = '0, rnd = '0, q;

    aes_rlut #(.PRIM(PRIM)) dut (
      .clk(clk), .rst_n(rst_n), .cfg_we(we), .cfg_addr(wa), .cfg_data(wd),
      .addr(addr), .q_load(q_load), .q_pre(q_pre), .rnd(rnd), .q(q)
    );

    initial begin
      logic [7:0] tab [256];
      for (int j = 0; j < NBANK; j++) begin wa[j] = '0; wd[j] = '0; end
      @(posedge rst_n);
      for (int n = 0; n < 2; n++) begin
        for (int a = 0; a < 256; a++) tab[a] = 8'($urandom);
        for (int c = 0; c < DEPTH; c++) begin
          @(negedge clk);
          we = 1;
          for (int j = 0; j < NBANK; j++) begin
            wa[j] = LW'(DEPTH - 1 - c);
            wd[j] = tab[j * DEPTH + DEPTH - 1 - c];
          end
        end
        @(negedge clk); we = 0;
        for (int a = 0; a < 256; a++) begin
          addr = 8'(a); rnd = 8'($urandom); q_load = 1; q_pre = (a % 7 == 3);
          @(negedge clk);
          checks++;
          if (q !== (q_pre ? rnd : tab[a])) begin
            failures++;
            $display("FAIL: prim %0d addr %0d q %h want %h", p, a, q, tab[a]);
          end
          q_load = 0; q_pre = 0;
        end
      end
      finished[p] = 1'b1;
    end
  end

  initial begin
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
