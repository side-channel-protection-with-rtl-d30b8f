// aes_keysched: AES-128 key schedule of the masked AES core.
//
// A 128-bit round-key register fed through a two-way multiplexer: with first
// high it takes the cipher key, otherwise (on step) the next round key from
// the on-the-fly key expansion, using round constant rcon_of(round). The
// round key leaves the block masked, rk_masked = k_r ^ m', so that the
// unmasked key is never combined with the state. The key register itself is
// not masked, as in the architecture this follows.
module aes_keysched
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [127:0] key,
  input  logic         step,
  input  logic [3:0]   round,
  input  logic [127:0] m_prime,
  output logic [127:0] rk_masked
);
  logic [127:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k <= '0;
    else if (first) k <= key;
    else if (step)  k <= next_round_key(k, rcon_of(round));
  end

  assign rk_masked = k ^ m_prime;
endmodule
