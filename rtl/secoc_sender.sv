// secoc_sender: builds an authenticated PDU from data, ID and freshness value.
//
// The MAC manager computes the 128-bit MAC of (data, ID, FV) under the shared
// key. The PDU is {data[31:0], FV[10:0], MAC[20:0]}: only the low 32 bits of
// the data block travel, so the caller zero-pads the 32-bit payload to 128
// bits for the MAC to match the receiver's. The ID is authenticated but not
// sent. PDU is combinational from the MAC register and the held inputs and is
// valid while last_round is high, 44 cycles after ce rises; ce must stay high
// and the inputs stable until then. The data and TFV fields of the PDU are
// wired straight from the inputs; only TMAC comes from the MAC register.
// Field widths and order follow the original design; keeping the PDU
// unregistered is this design's choice.
module secoc_sender
  import aes_pkg::*, secoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic [FV_W-1:0]   FV,
  input  logic [ID_W-1:0]   ID,
  input  block_t            data,
  input  block_t            key,
  output logic [PDU_W-1:0]  PDU,
  output logic              last_round
);

  block_t mac;
  pdu_t   pdu;

  mac_manager #(.ID_W(ID_W), .FV_W(FV_W)) u_mac (
    .clk, .rst, .ce, .FV, .ID, .data, .key, .MAC(mac), .last_round
  );

  assign pdu.data = data[PDU_DATA_W-1:0];
  assign pdu.tfv  = FV;
  assign pdu.tmac = mac[TMAC_W-1:0];
  assign PDU      = pdu;

endmodule
