// secoc_receiver: checks a received PDU for freshness and authenticity.
//
// The PDU is split into data, TFV and TMAC. The freshness check is an
// equality test of TFV against the local freshness value FV. The MAC manager
// recomputes the MAC over the data zero-padded to 128 bits, the ID and the
// local FV, and its low 21 bits are compared with TMAC. When the MAC is ready
// (last_round, 44 cycles after ce rises) status is 1 only if both checks
// pass, and data_out then carries the zero-padded data; otherwise data_out is
// zero. status and data_out are combinational and valid while last_round is
// high. data_out[127:32] is constant zero, the padding of the 32-bit
// payload; it is kept so the port matches the 128-bit data block.
// The structure follows the original design; the exact-match freshness
// rule and zeroing unverified data are this design's choices.
module secoc_receiver
  import aes_pkg::*, secoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic [FV_W-1:0]   FV,
  input  logic [ID_W-1:0]   ID,
  input  logic [PDU_W-1:0]  PDU,
  input  block_t            key,
  output block_t            data_out,
  output logic              last_round,
  output logic              status
);

  pdu_t   pdu;
  block_t data_pad, mac;
  logic   fv_ok, mac_ok;

  assign pdu      = PDU;
  assign data_pad = block_t'(pdu.data);

  mac_manager #(.ID_W(ID_W), .FV_W(FV_W)) u_mac (
    .clk, .rst, .ce, .FV, .ID, .data(data_pad), .key, .MAC(mac), .last_round
  );

  assign fv_ok    = (pdu.tfv == FV);
  assign mac_ok   = (pdu.tmac == mac[TMAC_W-1:0]);
  assign status   = last_round & fv_ok & mac_ok;
  assign data_out = status ? data_pad : '0;

endmodule
