// aes_rlut: randomized look-up table holding one masked AES S-box,
//   T(x) = S(x ^ m_i) ^ om_i,
// in writable memory, so that its contents change with every new mask pair.
//
// The 256 x 8 table is split into NBANK = 256 / DEPTH banks of DEPTH entries,
// DEPTH being the depth of the chosen memory primitive (aes_pkg::prim_e). All
// banks are written in the same cycle, one entry each: cfg_addr[j] is the
// local address and cfg_data[j] the byte for bank j. Entry x lives in bank
// x / DEPTH at local address x mod DEPTH. Reading is asynchronous into the
// output register q, the register stage after the S-boxes: when q_load is
// high, q takes T(addr), or the random precharge byte rnd when q_pre is also
// high. One read therefore takes one cycle for every primitive. Distributed
// and block RAM variants differ here only in DEPTH; how a synthesis tool maps
// the array onto LUT RAM or block RAM is left to it.
module aes_rlut
  import aes_pkg::*;
#(
  parameter prim_e       PRIM  = PRIM_RAM32M,
  parameter int unsigned DEPTH = prim_depth(PRIM),
  parameter int unsigned LW    = clog2_depth(PRIM),
  parameter int unsigned NBANK = 256 / DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [LW-1:0] cfg_addr [NBANK],
  input  logic [7:0]    cfg_data [NBANK],
  input  logic [7:0]    addr,
  input  logic          q_load,
  input  logic          q_pre,
  input  logic [7:0]    rnd,
  output logic [7:0]    q
);
  logic [7:0] mem [NBANK][DEPTH];
  logic [7:0] rd;

  always_ff @(posedge clk) begin
    if (cfg_we)
      for (int j = 0; j < NBANK; j++) mem[j][cfg_addr[j]] <= cfg_data[j];
  end

  always_comb begin
    rd = '0;
    for (int j = 0; j < NBANK; j++)
      if (j == int'(addr) / DEPTH) rd = mem[j][LW'(addr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (q_load) q <= q_pre ? rnd : rd;
  end
endmodule
