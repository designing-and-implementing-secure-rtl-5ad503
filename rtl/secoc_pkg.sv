// secoc_pkg: field widths shared by the SecOC sender, receiver and top.
//
// A PDU fills the 8-byte payload of a classic CAN frame:
//   PDU[63:32] data (the low 32 bits of the 128-bit data block)
//   PDU[31:21] TFV, the freshness value
//   PDU[20:0]  TMAC, the 21 least significant bits of the 128-bit MAC
// The MAC is computed over the data zero-padded to 128 bits, so sender and
// receiver feed the same block to the MAC manager.
package secoc_pkg;

  localparam int unsigned ID_W       = 11;
  localparam int unsigned FV_W       = 11;
  localparam int unsigned TMAC_W     = 21;
  localparam int unsigned PDU_DATA_W = 32;
  localparam int unsigned PDU_W      = PDU_DATA_W + FV_W + TMAC_W;   // 64

  // AXI4-Lite register file of the SecOC peripheral: 16 registers of 32 bits
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned NUM_REGS   = 16;
  localparam int unsigned AXI_ADDR_W = $clog2(NUM_REGS) + 2;       // byte address, 6

  // register indices (byte address = 4 * index)
  localparam int unsigned REG_DATA0   = 0;    // 0..3   data_in, REG_DATA0 holds bits 31:0
  localparam int unsigned REG_KEY0    = 4;    // 4..7   key, REG_KEY0 holds bits 31:0
  localparam int unsigned REG_PDU_IN0 = 8;    // 8..9   PDU_in, REG_PDU_IN0 holds bits 31:0
  localparam int unsigned REG_ID_FV   = 10;   // ID in bits 26:16, FV in bits 10:0
  localparam int unsigned REG_CTRL    = 11;   // bit 0 ce, bit 1 mode_select (1 = send), bit 2 reset
  localparam int unsigned REG_STATUS  = 12;   // read only: bit 0 last_round, bit 1 status
  localparam int unsigned REG_DATAOUT = 13;   // read only: verified data
  localparam int unsigned REG_PDU_OUT0 = 14;  // read only, 14..15: PDU_out, 14 holds bits 31:0
  localparam int unsigned NUM_WREGS   = 12;   // registers 0..11 are writable

  localparam int unsigned CTRL_CE   = 0;
  localparam int unsigned CTRL_MODE = 1;
  localparam int unsigned CTRL_RST  = 2;

  typedef struct packed {
    logic [PDU_DATA_W-1:0] data;
    logic [FV_W-1:0]       tfv;
    logic [TMAC_W-1:0]     tmac;
  } pdu_t;

endpackage
