// secoc_top: the SecOC core, one sender and one receiver behind a mode switch.
//
// mode_select = 1 enables the sender: data_in[31:0] (zero-padded to 128
// bits), ID, FV and key produce PDU_out. mode_select = 0 enables the
// receiver: PDU_in, ID, FV and key produce status and the verified
// data_out. Each side's enable is ce ANDed with its mode, so only one of the
// two runs; last_round is that side's last_round. An operation takes 44
// cycles from ce rising to last_round, with ce held high and the inputs
// stable. Interface and structure follow the original design; which
// mode_select value means "send", and using a multiplexer for last_round
// where the original had a latch, are this design's choices.
module secoc_top
  import aes_pkg::*, secoc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ce,
  input  logic                  mode_select,
  input  block_t                data_in,
  input  logic [ID_W-1:0]       ID,
  input  logic [FV_W-1:0]       FV,
  input  block_t                key,
  input  logic [PDU_W-1:0]      PDU_in,
  output logic [PDU_W-1:0]      PDU_out,
  output logic [PDU_DATA_W-1:0] data_out,
  output logic                  status,
  output logic                  last_round
);

  logic   ce_sender, ce_receiver;
  logic   lr_sender, lr_receiver;
  block_t rx_data;

  assign ce_sender   = ce & mode_select;
  assign ce_receiver = ce & ~mode_select;

  secoc_sender u_sender (
    .clk, .rst, .ce(ce_sender), .FV, .ID,
    .data(block_t'(data_in[PDU_DATA_W-1:0])), .key,
    .PDU(PDU_out), .last_round(lr_sender)
  );

  secoc_receiver u_receiver (
    .clk, .rst, .ce(ce_receiver), .FV, .ID, .PDU(PDU_in), .key,
    .data_out(rx_data), .last_round(lr_receiver), .status
  );

  assign data_out   = rx_data[PDU_DATA_W-1:0];
  assign last_round = mode_select ? lr_sender : lr_receiver;

endmodule
