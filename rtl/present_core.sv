// present_core: round-based PRESENT-80 encryption with three switchable
// side-channel countermeasures on the substitution layer.
//
//   en_decomp    S-box decomposition: every S-box is split into a random
//                permutation R1 and R2 = S o R1^-1, held in reconfigurable
//                function tables and redrawn for every encryption.
//   en_mask      Boolean masking: the state carries a fresh 64-bit mask m1 and
//                the register between the tables a fresh mask m2; both are
//                folded into the table contents, so no table input or output
//                is ever unmasked inside the round.
//   en_precharge register precharge: the register between the tables and the
//                state register are each loaded with a random value in the
//                cycle before they take their real value.
// With all three off the core is a plain PRESENT-80 whose S-boxes still sit
// in the function tables (loaded with the PRESENT S-box itself).
//
// Data path per round: state ^ round key -> R1' -> mid register -> R2' ->
// bit permutation -> state. The key schedule is unmasked. The final round key
// and the mask m1 are removed when the ciphertext register is written.
//
// Interface and timing: start (one cycle, while busy is low) takes plaintext,
// key and the three enables. The core then draws the masks from the internal
// PRNG (1 cycle), shuffles the sixteen R1 permutations (present_r1_gen, 15
// cycles plus one to hand over; skipped swaps leave the identity when
// decomposition is off), reloads all 32 function tables (16 shift cycles plus
// one to hand over) and runs 31 rounds of 2 cycles (4 with precharge). Then
// the ciphertext register is written and done pulses for one cycle. Counting
// the start cycle, done is high in cycle 98 (160 with precharge).
// The internal PRNG is reseeded from seed while seed_load is high.
module present_core
  import present_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [63:0] seed,
  input  logic        start,
  input  logic [63:0] plaintext,
  input  logic [79:0] key,
  input  logic        en_decomp,
  input  logic        en_mask,
  input  logic        en_precharge,
  output logic        busy,
  output logic [63:0] ciphertext,
  output logic        done
);
  typedef enum logic [3:0] {
    S_IDLE, S_DRAW, S_SHUF, S_CFG, S_PRE_MID, S_MID, S_PRE_ST, S_ST, S_OUT
  } state_e;

  localparam int unsigned RW = 64 + 64 + 64 + 128;

  state_e            st;
  logic [RW-1:0]     rnd;
  logic [63:0]       m1, m2, state, pt_q;
  logic [15:0][15:0][3:0] r1;
  logic              r1_done;
  logic [4:0]        round;
  logic              dec_q, mask_q, pre_q;
  logic              cfg_start, cfg_busy, cfg_en, cfg_done;
  logic [63:0]       cfg_r1, cfg_r2, rk, sl_out;
  logic              mid_load, mid_pre, ks_step;

  prng #(.WIDTH(RW)) u_prng (
    .clk(clk), .rst_n(rst_n), .load(seed_load), .seed(seed),
    .next(1'b1), .rnd(rnd)
  );

  present_r1_gen u_r1 (
    .clk(clk), .rst_n(rst_n), .start(st == S_DRAW), .shuffle(dec_q),
    .rnd(rnd[319:192]), .busy(), .r1(r1), .done(r1_done)
  );

  present_rft_cfg u_cfg (
    .clk(clk), .rst_n(rst_n), .start(cfg_start), .r1(r1),
    .m1(m1), .m2(m2), .busy(cfg_busy), .cfg_en(cfg_en),
    .cfg_r1(cfg_r1), .cfg_r2(cfg_r2), .done(cfg_done)
  );

  present_slayer u_slayer (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_r1(cfg_r1),
    .cfg_r2(cfg_r2), .x(state ^ rk), .mid_load(mid_load),
    .mid_pre(mid_pre), .mid_rnd(rnd[63:0]), .mid(), .y(sl_out)
  );

  present_keysched u_ks (
    .clk(clk), .rst_n(rst_n), .load(start && st == S_IDLE), .key_in(key),
    .step(ks_step), .rc(round), .rk(rk)
  );

  assign busy      = (st != S_IDLE);
  assign cfg_start = r1_done;
  assign mid_load  = (st == S_PRE_MID) || (st == S_MID);
  assign mid_pre   = (st == S_PRE_MID);
  assign ks_step   = (st == S_ST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      m1         <= '0;
      m2         <= '0;
      state      <= '0;
      pt_q       <= '0;
      round      <= '0;
      dec_q      <= 1'b0;
      mask_q     <= 1'b0;
      pre_q      <= 1'b0;
      ciphertext <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          pt_q   <= plaintext;
          dec_q  <= en_decomp;
          mask_q <= en_mask;
          pre_q  <= en_precharge;
          st     <= S_DRAW;
        end
        S_DRAW: begin
          m1 <= mask_q ? rnd[63:0]   : '0;
          m2 <= mask_q ? rnd[127:64] : '0;
          st <= S_SHUF;
        end
        S_SHUF: if (r1_done) st <= S_CFG;
        S_CFG: begin
          state <= pt_q ^ m1;
          round <= 5'd1;
          if (cfg_done) st <= pre_q ? S_PRE_MID : S_MID;
        end
        S_PRE_MID: st <= S_MID;
        S_MID:     st <= pre_q ? S_PRE_ST : S_ST;
        S_PRE_ST: begin
          state <= rnd[191:128];
          st    <= S_ST;
        end
        S_ST: begin
          state <= perm(sl_out);
          round <= round + 5'd1;
          if (round == 5'(NROUNDS)) st <= S_OUT;
          else                      st <= pre_q ? S_PRE_MID : S_MID;
        end
        S_OUT: begin
          ciphertext <= state ^ rk ^ m1;
          done       <= 1'b1;
          st         <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
