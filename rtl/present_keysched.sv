// present_keysched: PRESENT-80 key schedule (standard PRESENT).
//
// An 80-bit key register. load copies key_in. step applies one update with
// round counter rc: rotate left by 61, pass the top nibble through the S-box,
// xor rc into bits 19:15. The round key is the top 64 bits, so after load
// rk is round key 1 and after step with rc = i it is round key i+1. The key
// path is not masked, as in the protected design it serves.
module present_keysched
  import present_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [79:0] key_in,
  input  logic        step,
  input  logic [4:0]  rc,
  output logic [63:0] rk
);
  logic [79:0] k, kr;

  always_comb begin
    kr = {k[18:0], k[79:19]};
    kr[79:76] = sbox(kr[79:76]);
    kr[19:15] = kr[19:15] ^ rc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    k <= '0;
    else if (load) k <= key_in;
    else if (step) k <= kr;
  end

  assign rk = k[79:16];
endmodule
