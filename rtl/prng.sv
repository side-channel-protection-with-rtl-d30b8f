// prng: pseudo-random number source for masks, random tables and precharge
// values.
//
// WIDTH output bits come from ceil(WIDTH/64) independent xorshift64 generators
// (shifts 13, 7, 17). Each generator is loaded from the 64-bit seed, xored with
// a per-lane constant, while load is high; with next high it advances one step
// per clock, otherwise it holds. rnd is the current state (registered output).
// A zero seed is replaced by a fixed nonzero value, because zero is the one
// state xorshift never leaves. This is a deterministic generator; a deployed
// device would feed it from a true random source.
module prng #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [63:0]      seed,
  input  logic             next,
  output logic [WIDTH-1:0] rnd
);
  localparam int unsigned LANES = (WIDTH + 63) / 64;

  logic [64*LANES-1:0] st;

  function automatic logic [63:0] step(input logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [63:0] s0;
    always_comb begin
      s0 = seed ^ (64'h9E37_79B9_7F4A_7C15 * 64'(l + 1));
      if (s0 == '0) s0 = 64'h0123_4567_89AB_CDEF;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    st[64*l +: 64] <= 64'h0123_4567_89AB_CDEF ^ 64'(l);
      else if (load) st[64*l +: 64] <= s0;
      else if (next) st[64*l +: 64] <= step(st[64*l +: 64]);
    end
  end

  assign rnd = st[WIDTH-1:0];
endmodule
