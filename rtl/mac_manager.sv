// mac_manager: message authentication code over (data, ID, FV) built from
// four AES-128 cores that run one after another.
//
//   C1  = AES_K(data)                         core 1
//   C2  = AES_K(C1 ^ {106'b0, ID, FV})        core 2
//   SK  = AES_K(128'b0)                       core 3, the subkey
//   MAC = AES_K(C2 ^ SK ^ 128'b0)             core 4
//
// This is the chained-encryption (CBC-MAC) structure of CMAC with a final
// block that XORs in a subkey. As in the original design the subkey is the
// encryption of the all-zero block used as is, without the doubling in
// GF(2^128) that NIST SP 800-38B applies, so the result is not a standard
// CMAC. The third message block is a 106-bit zero word (128 minus the ID and
// FV lengths); zero-extended, it leaves the XOR unchanged.
//
// Sequencing: each core's ce is the module's ce ANDed with the previous
// core's last_round, so the cores start one after another; the module's
// last_round is the last core's. With 11 cycles per core, MAC is valid 44
// cycles after ce rises and stays valid while ce stays high. ce low clears
// all four cores. The placement of ID above FV inside the block, and running
// the subkey core third, are this design's choices.
module mac_manager
  import aes_pkg::*;
#(
  parameter int unsigned ID_W = 11,
  parameter int unsigned FV_W = 11
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic [FV_W-1:0] FV,
  input  logic [ID_W-1:0] ID,
  input  block_t          data,
  input  block_t          key,
  output block_t          MAC,
  output logic            last_round
);

  block_t msg_sub2, msg_sub3, msg_sub4;
  block_t c1, c2, sk;
  logic   lr1, lr2, lr_sk;

  assign msg_sub2 = block_t'({ID, FV});    // zero-extended to 128 bits
  assign msg_sub3 = '0;                    // 106-bit zero word, zero-extended
  assign msg_sub4 = '0;

  aes128 u_aes1 (.clk, .rst, .ce(ce),
                 .key, .msg(data),                  .cipher(c1),  .last_round(lr1));
  aes128 u_aes2 (.clk, .rst, .ce(ce & lr1),
                 .key, .msg(c1 ^ msg_sub2),         .cipher(c2),  .last_round(lr2));
  aes128 u_aes4 (.clk, .rst, .ce(ce & lr2),
                 .key, .msg(msg_sub4),              .cipher(sk),  .last_round(lr_sk));
  aes128 u_aes3 (.clk, .rst, .ce(ce & lr_sk),
                 .key, .msg(c2 ^ sk ^ msg_sub3),    .cipher(MAC), .last_round(last_round));

endmodule
