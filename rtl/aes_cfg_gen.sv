// aes_cfg_gen: configuration generator that fills the sixteen randomized
// look-up tables of the masked AES before an encryption.
//
// A configuration counter c runs over one bank depth. For every bank b the
// generator evaluates the AES S-box once, s_b = S({b, c}), shared by all
// sixteen tables. Table i receives at address {b, c} ^ m_i the byte
// s_b ^ om_i, where m_i is byte i of the S-box input mask m and om_i byte i of
// the output mask om = SR^-1(MC^-1(m ^ m')). Since xoring the bank bits with
// the top bits of m_i only permutes banks, each bank of each table takes
// exactly one write per cycle, and after DEPTH cycles table i holds
// T_i(x) = S(x ^ m_i) ^ om_i for all 256 x.
//
// Timing: start (one cycle, while busy is low) latches m and om; cfg_we is
// then high for DEPTH cycles (32, 64 or 256, by primitive) and done pulses in
// the cycle after the last write.
module aes_cfg_gen
  import aes_pkg::*;
#(
  parameter prim_e       PRIM  = PRIM_RAM32M,
  parameter int unsigned DEPTH = prim_depth(PRIM),
  parameter int unsigned LW    = clog2_depth(PRIM),
  parameter int unsigned NBANK = 256 / DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [127:0]  m,
  input  logic [127:0]  om,
  output logic          busy,
  output logic          cfg_we,
  output logic [LW-1:0] cfg_addr [16][NBANK],
  output logic [7:0]    cfg_data [16][NBANK],
  output logic          done
);
  logic [LW-1:0] cnt;
  logic [127:0]  m_q, om_q;
  logic [7:0]    s_bank [NBANK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
      m_q  <= '0;
      om_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        m_q  <= m;
        om_q <= om;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == LW'(DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign cfg_we = busy;

  always_comb begin
    for (int b = 0; b < NBANK; b++)
      s_bank[b] = sbox(8'(b * DEPTH) | 8'(cnt));
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < NBANK; j++) begin
        cfg_addr[i][j] = cnt ^ LW'(get_byte(m_q, i));
        cfg_data[i][j] = s_bank[j ^ (int'(get_byte(m_q, i)) / DEPTH)] ^ get_byte(om_q, i);
      end
    end
  end
endmodule
