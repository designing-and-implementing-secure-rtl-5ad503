// secoc_axi: the SecOC core as an AXI4-Lite peripheral of a soft processor.
//
// The processor writes the operation's inputs into twelve 32-bit registers,
// starts it by setting ce (and the mode) in the control register, polls the
// status register until last_round is 1, reads the PDU or the verified data
// and the status, and clears ce before the next operation. Register map
// (byte address = 4 * index), see secoc_pkg:
//   0-3   data_in   (0 = bits 31:0)       10  ID[26:16], FV[10:0]
//   4-7   key       (4 = bits 31:0)       11  control: 0 ce, 1 mode (1 = send), 2 reset
//   8-9   PDU_in    (8 = bits 31:0)       12  status (RO): 0 last_round, 1 status
//                                         13  data_out (RO), 14-15 PDU_out (RO)
// Writes to read-only registers are accepted and ignored; all responses are
// OKAY. Byte strobes are honoured.
//
// Bus timing: a write is taken in the cycle both AWVALID and WVALID are high
// and no response is pending (AWREADY and WREADY are high together in that
// cycle); BVALID follows one cycle later and is held until BREADY. A read is
// taken when ARVALID is high and no read data is pending; RVALID and RDATA
// follow one cycle later and are held until RREADY. s_axi_aresetn is active
// low and synchronous; it, or control bit 2, resets the core.
//
// The original system has a custom AXI peripheral with 16 32-bit registers;
// the register assignment, the AXI4-Lite handshake details and the software
// reset bit are this design's own.
module secoc_axi
  import aes_pkg::*, secoc_pkg::*;
(
  input  logic                   s_axi_aclk,
  input  logic                   s_axi_aresetn,
  // write address
  input  logic [AXI_ADDR_W-1:0]  s_axi_awaddr,
  input  logic [2:0]             s_axi_awprot,
  input  logic                   s_axi_awvalid,
  output logic                   s_axi_awready,
  // write data
  input  logic [AXI_DATA_W-1:0]  s_axi_wdata,
  input  logic [AXI_DATA_W/8-1:0] s_axi_wstrb,
  input  logic                   s_axi_wvalid,
  output logic                   s_axi_wready,
  // write response
  output logic [1:0]             s_axi_bresp,
  output logic                   s_axi_bvalid,
  input  logic                   s_axi_bready,
  // read address
  input  logic [AXI_ADDR_W-1:0]  s_axi_araddr,
  input  logic [2:0]             s_axi_arprot,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  // read data
  output logic [AXI_DATA_W-1:0]  s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready
);

  localparam int unsigned IDX_W = $clog2(NUM_REGS);

  logic                  clk;
  logic [AXI_DATA_W-1:0] wregs [NUM_WREGS];
  logic                  wr_en, rd_en;
  logic [IDX_W-1:0]      wr_idx, rd_idx;
  logic [AXI_DATA_W-1:0] rd_word;

  // core signals
  logic                  core_rst;
  block_t                data_in, key;
  logic [PDU_W-1:0]      pdu_in, pdu_out;
  logic [PDU_DATA_W-1:0] data_out;
  logic                  status, last_round;

  assign clk = s_axi_aclk;

  // ---------------------------------------------------------------- writes
  assign wr_en         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign wr_idx        = s_axi_awaddr[AXI_ADDR_W-1:2];
  assign s_axi_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!s_axi_aresetn) begin
      s_axi_bvalid <= 1'b0;
      for (int i = 0; i < NUM_WREGS; i++) wregs[i] <= '0;
    end else begin
      if (wr_en) begin
        s_axi_bvalid <= 1'b1;
        if (wr_idx < IDX_W'(NUM_WREGS))
          for (int b = 0; b < AXI_DATA_W/8; b++)
            if (s_axi_wstrb[b]) wregs[wr_idx][8*b +: 8] <= s_axi_wdata[8*b +: 8];
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // ----------------------------------------------------------------- reads
  assign rd_en         = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_idx        = s_axi_araddr[AXI_ADDR_W-1:2];
  assign s_axi_rresp   = 2'b00;

  always_comb begin
    if (rd_idx < IDX_W'(NUM_WREGS)) rd_word = wregs[rd_idx];
    else begin
      unique case (rd_idx)
        IDX_W'(REG_STATUS):     rd_word = AXI_DATA_W'({status, last_round});
        IDX_W'(REG_DATAOUT):    rd_word = data_out;
        IDX_W'(REG_PDU_OUT0):   rd_word = pdu_out[31:0];
        default:                rd_word = pdu_out[63:32];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!s_axi_aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_en) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= rd_word;
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // ------------------------------------------------------------------ core
  assign data_in  = {wregs[REG_DATA0+3], wregs[REG_DATA0+2], wregs[REG_DATA0+1], wregs[REG_DATA0]};
  assign key      = {wregs[REG_KEY0+3],  wregs[REG_KEY0+2],  wregs[REG_KEY0+1],  wregs[REG_KEY0]};
  assign pdu_in   = {wregs[REG_PDU_IN0+1], wregs[REG_PDU_IN0]};
  assign core_rst = !s_axi_aresetn || wregs[REG_CTRL][CTRL_RST];

  secoc_top u_core (
    .clk,
    .rst         (core_rst),
    .ce          (wregs[REG_CTRL][CTRL_CE]),
    .mode_select (wregs[REG_CTRL][CTRL_MODE]),
    .data_in,
    .ID          (wregs[REG_ID_FV][16 +: ID_W]),
    .FV          (wregs[REG_ID_FV][0 +: FV_W]),
    .key,
    .PDU_in      (pdu_in),
    .PDU_out     (pdu_out),
    .data_out,
    .status,
    .last_round
  );

  // ------------------------------------------------------- bus rule checks
  // a master keeps its valid signals and payload until they are taken
  a_aw_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid && $stable(s_axi_awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_wvalid && !s_axi_wready |=> s_axi_wvalid && $stable(s_axi_wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid && $stable(s_axi_araddr));
  // this slave keeps its responses until they are taken
  a_b_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
