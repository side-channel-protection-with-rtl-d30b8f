// aes_core: round-based, first-order masked AES-128 whose S-boxes are
// randomized look-up tables reloaded before every encryption.
//
// Masking scheme (the host supplies masks and masked data):
//   plaintext_m = p ^ m ^ m'     input, masked by the state mask m and the
//                                key mask m'
//   om          = SR^-1(MC^-1(m ^ m'))   S-box output mask, also supplied
//   round key   = k_r ^ m'       (aes_keysched)
// The key addition turns p ^ m ^ m' into p ^ k ^ m. Table i computes
// S(x ^ m_i) ^ om_i, so after ShiftRows and MixColumns the state carries
// m ^ m' and the next masked round key restores mask m. In the last round
// MixColumns is bypassed, giving ciphertext_m = c ^ MC^-1(m ^ m') ^ m', which
// the host unmasks.
//
// Data path: first-mux -> key addition -> pre register -> 16 randomized
// look-up tables (output register q) -> ShiftRows -> MixColumns (bypassed in
// the last round) -> back to the first-mux. With en_precharge high, the pre
// register and the table output registers take a fresh random value from
// the internal PRNG in the cycle before each real value.
//
// Interface and timing: start (one cycle, busy low) takes all inputs. The
// configuration generator first rewrites all tables (DEPTH cycles: 32, 64 or
// 256 by PRIM), then the first key addition is registered and ten rounds of
// 2 cycles (4 with precharge) follow. ciphertext_m is registered and done
// pulses for one cycle: counting the start cycle as cycle 1, done is high in
// cycle DEPTH + 24 (DEPTH + 44 with precharge), i.e. 56 / 88 / 280 / 280
// cycles for RAM32M / RAM64M / RAM256X1S / RAMB8BWER tables. The internal
// PRNG is reseeded while seed_load is high.
module aes_core
  import aes_pkg::*;
#(
  parameter prim_e PRIM = PRIM_RAM32M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [63:0]  seed,
  input  logic         start,
  input  logic [127:0] plaintext_m,
  input  logic [127:0] key,
  input  logic [127:0] m,
  input  logic [127:0] m_prime,
  input  logic [127:0] om,
  input  logic         en_precharge,
  output logic         busy,
  output logic [127:0] ciphertext_m,
  output logic         done
);
  localparam int unsigned DEPTH = prim_depth(PRIM);
  localparam int unsigned LW    = clog2_depth(PRIM);
  localparam int unsigned NBANK = 256 / DEPTH;

  typedef enum logic [2:0] {
    S_IDLE, S_CFG, S_FIRST, S_PRE_Q, S_Q, S_PRE_P, S_P, S_OUT
  } state_e;

  state_e        st;
  logic [127:0]  pt_q, mp_q, pre, sb_out, sr_out, rnd, rk_m, fb;
  logic [3:0]    round;
  logic          pre_q_en;
  logic          cfg_busy, cfg_we, cfg_done;
  logic [LW-1:0] cfg_addr [16][NBANK];
  logic [7:0]    cfg_data [16][NBANK];
  logic          q_load, q_pre, ks_step;

  prng #(.WIDTH(128)) u_prng (
    .clk(clk), .rst_n(rst_n), .load(seed_load), .seed(seed),
    .next(1'b1), .rnd(rnd)
  );

  aes_cfg_gen #(.PRIM(PRIM)) u_cfg (
    .clk(clk), .rst_n(rst_n), .start(start && st == S_IDLE), .m(m), .om(om),
    .busy(cfg_busy), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .done(cfg_done)
  );

  aes_keysched u_ks (
    .clk(clk), .rst_n(rst_n), .first(start && st == S_IDLE), .key(key),
    .step(ks_step), .round(round - 4'd1), .m_prime(mp_q), .rk_masked(rk_m)
  );

  assign q_load  = (st == S_PRE_Q) || (st == S_Q);
  assign q_pre   = (st == S_PRE_Q);
  assign ks_step = (st == S_Q);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_rlut #(.PRIM(PRIM)) u_lut (
      .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr[i]),
      .cfg_data(cfg_data[i]), .addr(pre[127 - 8*i -: 8]), .q_load(q_load),
      .q_pre(q_pre), .rnd(rnd[8*i +: 8]), .q(sb_out[127 - 8*i -: 8])
    );
  end

  assign sr_out = shift_rows(sb_out);
  assign fb     = (round == 4'(NROUNDS)) ? sr_out : mix_columns(sr_out);

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      pt_q         <= '0;
      mp_q         <= '0;
      pre          <= '0;
      round        <= '0;
      pre_q_en     <= 1'b0;
      ciphertext_m <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          pt_q     <= plaintext_m;
          mp_q     <= m_prime;
          pre_q_en <= en_precharge;
          st       <= S_CFG;
        end
        S_CFG: if (cfg_done) st <= S_FIRST;
        S_FIRST: begin
          pre   <= pt_q ^ rk_m;
          round <= 4'd1;
          st    <= pre_q_en ? S_PRE_Q : S_Q;
        end
        S_PRE_Q: st <= S_Q;
        S_Q:     st <= pre_q_en ? S_PRE_P : S_P;
        S_PRE_P: begin
          pre <= rnd;
          st  <= S_P;
        end
        S_P: begin
          if (round == 4'(NROUNDS)) begin
            st <= S_OUT;
          end else begin
            pre   <= fb ^ rk_m;
            round <= round + 4'd1;
            st    <= pre_q_en ? S_PRE_Q : S_Q;
          end
        end
        S_OUT: begin
          ciphertext_m <= fb ^ rk_m;
          done         <= 1'b1;
          st           <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
