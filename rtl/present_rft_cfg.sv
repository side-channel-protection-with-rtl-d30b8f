// present_rft_cfg: table generator for the decomposed, masked PRESENT S-boxes.
//
// The PRESENT S-box S is split into two 4x4 tables per S-box position i:
// R1_i is a random bijection and R2_i = S o R1_i^-1, so R2_i(R1_i(x)) = S(x).
// Boolean masking is folded into the tables:
//   R1'_i(x) = R1_i(x ^ m1_i) ^ m2_i
//   R2'_i(y) = R2_i(y ^ m2_i) ^ P^-1(m1)_i
// where m1 is the 64-bit state mask, m2 the 64-bit mask of the register
// between the tables and P^-1(m1)_i nibble i of the inversely permuted state
// mask, so that after the bit permutation the state carries mask m1 again.
// R1_i arrives as a table (present_r1_gen); R1_i^-1 is found by searching
// that table. With decomposition off R1 is the identity, with masking off
// both masks are zero.
//
// Timing: a one-cycle start pulse begins 16 cycles with cfg_en high. In cycle
// k (k = 0..15) the generator puts out the entries for address 15-k on
// cfg_r1 / cfg_r2 (nibble i for S-box i), the order the RFT shift chains
// expect. done pulses in the cycle after the last entry. Inputs must stay
// stable while busy is high.
module present_rft_cfg
  import present_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [15:0][15:0][3:0] r1,
  input  logic [63:0]     m1,
  input  logic [63:0]     m2,
  output logic            busy,
  output logic            cfg_en,
  output logic [63:0]     cfg_r1,
  output logic [63:0]     cfg_r2,
  output logic            done
);
  logic [3:0] cnt;
  nib_t       addr;
  pstate_t    om;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + 4'd1;
        if (cnt == 4'd15) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign cfg_en = busy;
  assign addr   = 4'd15 - cnt;
  assign om     = inv_perm(m1);

  always_comb begin
    nib_t a1, a2, pre;
    for (int i = 0; i < 16; i++) begin
      a1  = addr ^ m1[4*i +: 4];
      a2  = addr ^ m2[4*i +: 4];
      pre = '0;
      for (int x = 0; x < 16; x++) if (r1[i][x] == a2) pre = nib_t'(x);
      cfg_r1[4*i +: 4] = r1[i][a1] ^ m2[4*i +: 4];
      cfg_r2[4*i +: 4] = sbox(pre) ^ om[4*i +: 4];
    end
  end
endmodule
