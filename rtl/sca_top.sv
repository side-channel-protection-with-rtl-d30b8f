// sca_top: the two side-channel protected block ciphers side by side.
//
// - aes_core: masked AES-128 with randomized look-up tables in writable
//   memory, reloaded through a configuration generator before each
//   encryption, plus register precharge.
// - present_core: PRESENT-80 whose S-boxes are decomposed into two
//   reconfigurable function tables built from CFGLUT5 shift-register LUTs,
//   with switchable decomposition, Boolean masking and register precharge.
// The cores share clock and reset only; each has its own start/busy/done
// handshake, data ports and PRNG seed port (see the two modules for timing).
// AES_PRIM selects the memory primitive the AES tables are built from.
module sca_top
  import aes_pkg::*;
#(
  parameter prim_e AES_PRIM = PRIM_RAM32M
) (
  input  logic         clk,
  input  logic         rst_n,
  // masked AES-128
  input  logic         aes_seed_load,
  input  logic [63:0]  aes_seed,
  input  logic         aes_start,
  input  logic [127:0] aes_plaintext_m,
  input  logic [127:0] aes_key,
  input  logic [127:0] aes_m,
  input  logic [127:0] aes_m_prime,
  input  logic [127:0] aes_om,
  input  logic         aes_en_precharge,
  output logic         aes_busy,
  output logic [127:0] aes_ciphertext_m,
  output logic         aes_done,
  // protected PRESENT-80
  input  logic         pr_seed_load,
  input  logic [63:0]  pr_seed,
  input  logic         pr_start,
  input  logic [63:0]  pr_plaintext,
  input  logic [79:0]  pr_key,
  input  logic         pr_en_decomp,
  input  logic         pr_en_mask,
  input  logic         pr_en_precharge,
  output logic         pr_busy,
  output logic [63:0]  pr_ciphertext,
  output logic         pr_done
);
  aes_core #(.PRIM(AES_PRIM)) u_aes (
    .clk(clk), .rst_n(rst_n), .seed_load(aes_seed_load), .seed(aes_seed),
    .start(aes_start), .plaintext_m(aes_plaintext_m), .key(aes_key),
    .m(aes_m), .m_prime(aes_m_prime), .om(aes_om),
    .en_precharge(aes_en_precharge), .busy(aes_busy),
    .ciphertext_m(aes_ciphertext_m), .done(aes_done)
  );

  present_core u_present (
    .clk(clk), .rst_n(rst_n), .seed_load(pr_seed_load), .seed(pr_seed),
    .start(pr_start), .plaintext(pr_plaintext), .key(pr_key),
    .en_decomp(pr_en_decomp), .en_mask(pr_en_mask),
    .en_precharge(pr_en_precharge), .busy(pr_busy),
    .ciphertext(pr_ciphertext), .done(pr_done)
  );
endmodule
