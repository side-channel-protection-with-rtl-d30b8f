// tb_aes_cfg_gen: runs the configuration generator for every memory
// primitive with random masks, applies its bank writes to a model of the
// sixteen tables, and checks that table i ends up as S(x ^ m_i) ^ om_i for
// all x, that no entry is written twice, and that writing takes exactly DEPTH
// cycles (32, 64, 256, 256).
module tb_aes_cfg_gen;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [3:0] finished = '0;

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

  // reference S-box: the FIPS-197 definition through a brute-force inverse
  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, b;
    inv = '0;
    for (int c = 1; c < 256; c++) if (gmul(a, 8'(c)) == 8'h01) inv = 8'(c);
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  for (genvar p = 0; p < 4; p++) begin : g_prim
    localparam prim_e PRIM  = prim_e'(p);
    localparam int    DEPTH = prim_depth(PRIM);
    localparam int    LW    = clog2_depth(PRIM);
    localparam int    NBANK = 256 / DEPTH;
    logic          start = 0, busy, we, done;
    logic [127:0]  m, om;
    logic [LW-1:0] wa [16][NBANK];
    logic [7:0]    wd [16][NBANK];

    aes_cfg_gen #(.PRIM(PRIM)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .m(m), .om(om), .busy(busy),
      .cfg_we(we), .cfg_addr(wa), .cfg_data(wd), .done(done)
    );

    initial begin
      logic [7:0] tab [16][256];
      int         nwr [16][256];
      int         cyc;
      logic [7:0] mi, oi, want;
      logic [127:0] m_keep, om_keep;
      @(posedge rst_n);
      for (int n = 0; n < 2; n++) begin
        m  = {$urandom, $urandom, $urandom, $urandom};
        om = {$urandom, $urandom, $urandom, $urandom};
        for (int i = 0; i < 16; i++) for (int a = 0; a < 256; a++) nwr[i][a] = 0;
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        m_keep = m; om_keep = om;
        m = '0; om = '0;                    // generator must have latched them
        cyc = 0;
        while (we) begin
          for (int i = 0; i < 16; i++)
            for (int j = 0; j < NBANK; j++) begin
              tab[i][j * DEPTH + int'(wa[i][j])] = wd[i][j];
              nwr[i][j * DEPTH + int'(wa[i][j])]++;
            end
          cyc++;
          @(negedge clk);
        end
        checks++;
        if (cyc != DEPTH || !done) begin
          failures++; $display("FAIL: prim %0d took %0d cycles", p, cyc);
        end
        m  = m_keep; om = om_keep;
        for (int i = 0; i < 16; i++) begin
          mi = get_byte(m, i); oi = get_byte(om, i);
          for (int a = 0; a < 256; a++) begin
            want = ref_sbox(8'(a) ^ mi) ^ oi;
            checks++;
            if (nwr[i][a] != 1 || tab[i][a] !== want) begin
              failures++;
              $display("FAIL: prim %0d table %0d addr %0d got %h want %h", p, i, a, tab[i][a], want);
            end
          end
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
