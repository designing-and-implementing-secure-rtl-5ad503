// tb_secoc_axi: end-to-end testbench of the SecOC AXI4-Lite peripheral.
//
// The testbench plays the processor's program: it writes key, ID, FV and
// payload into the registers, starts a send, polls the status register,
// reads the 64-bit PDU and checks it against the reference model; then it
// writes the PDU back in receive mode and checks that it is accepted and the
// payload appears in the data-out register. It also makes every mechanism
// of the design happen and counts each: send, accepted receive, rejection of
// a tampered PDU, rejection of a replay (stale freshness value), software
// reset during an operation, ignored writes to read-only registers,
// byte-strobe writes, and write/read response back-pressure. The core's
// 44-cycle latency is checked with status reads timed to the clock edge.
// The peripheral
// runs with all its defaults.
`timescale 1ns/1ps
module tb_secoc_axi;
  import aes_ref_pkg::*;
  import secoc_pkg::*;

  logic        clk = 0, aresetn = 0;
  logic [5:0]  awaddr = 0, araddr = 0;
  logic [2:0]  awprot = 0, arprot = 0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0]  wstrb = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  int checks = 0, failures = 0;
  int n_send = 0, n_accept = 0, n_reject_mac = 0, n_reject_fv = 0, n_soft_reset = 0;
  int n_ro_write = 0, n_strobe = 0, n_b_stall = 0, n_r_stall = 0;

  secoc_axi dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready));

  always #5 clk = ~clk;

  // number of rising edges so far, and the edge of the last write handshake
  int unsigned cyc = 0, w_edge = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one AXI4-Lite write; stall > 0 holds BREADY low for that many cycles
  task automatic axi_write(int unsigned idx, logic [31:0] val, logic [3:0] strb = 4'hf,
                           int stall = 0);
    int n = 0;
    @(negedge clk);
    awaddr = 6'(idx * 4); wdata = val; wstrb = strb;
    awvalid = 1; wvalid = 1; bready = (stall == 0);
    do begin @(posedge clk); n++; end while (!(awready && wready) && n < 50);
    #1 awvalid = 0; wvalid = 0; w_edge = cyc;
    if (stall > 0) begin
      repeat (stall) begin
        @(posedge clk); #1 if (bvalid) n_b_stall++;
      end
      bready = 1;
    end
    n = 0;
    while (!bvalid && n < 50) begin @(posedge clk); #1 n++; end
    check(bvalid && bresp == 2'b00, "write response");
    @(posedge clk); #1 bready = 0;
  endtask

  // at > 0: the address is taken exactly on rising edge number 'at'
  task automatic axi_read(int unsigned idx, output logic [31:0] val, input int stall = 0,
                          input int unsigned at = 0);
    int n = 0;
    @(negedge clk);
    while (at > 0 && cyc < at - 1) @(negedge clk);
    araddr = 6'(idx * 4); arvalid = 1; rready = 0;
    do begin @(posedge clk); n++; end while (!arready && n < 50);
    #1 arvalid = 0;
    n = 0;
    while (!rvalid && n < 50) begin @(posedge clk); #1 n++; end
    val = rdata;
    repeat (stall) begin
      @(posedge clk); #1 if (rvalid && rdata == val) n_r_stall++;
    end
    check(rvalid && rresp == 2'b00, "read response");
    @(negedge clk) rready = 1;
    @(posedge clk); #1 rready = 0;
  endtask

  task automatic load(logic [127:0] key, logic [10:0] id, logic [10:0] fv,
                      logic [127:0] data, logic [63:0] pdu);
    for (int i = 0; i < 4; i++) axi_write(REG_KEY0 + i, key[32*i +: 32]);
    for (int i = 0; i < 4; i++) axi_write(REG_DATA0 + i, data[32*i +: 32]);
    axi_write(REG_PDU_IN0, pdu[31:0]);
    axi_write(REG_PDU_IN0 + 1, pdu[63:32]);
    axi_write(REG_ID_FV, {5'b0, id, 5'b0, fv});
  endtask

  // Start, check the core latency, poll for completion, return the status word.
  // ce is set on write edge W; the core's first enabled edge is W+1 and its
  // 4 x 11 cycles end on edge W+44, so a status read taken on edge W+44 still
  // sees last_round 0 and one taken on edge W+45 sees 1. 'probe' picks which
  // of the two this call checks.
  int n_probe = 0;
  task automatic run_op(bit send, output logic [31:0] st);
    int polls = 0;
    int unsigned off;
    axi_write(REG_CTRL, {29'b0, 1'b0, send, 1'b1});
    off = (n_probe % 2 == 0) ? 44 : 45;
    n_probe++;
    axi_read(REG_STATUS, st, 0, w_edge + off);
    check(st[0] == (off == 45), $sformatf("last_round %0b on edge W+%0d", st[0], off));
    while (!st[0] && polls < 20) begin axi_read(REG_STATUS, st); polls++; end
    check(st[0] == 1'b1, "last_round never seen by polling");
  endtask

  task automatic stop_op();
    logic [31:0] st;
    axi_write(REG_CTRL, 32'h0);
    axi_read(REG_STATUS, st);
    check(st[1:0] == 2'b00, "status not cleared after ce low");
  endtask

  initial begin
    logic [127:0] key, data;
    logic [10:0] id, fv;
    logic [63:0] exp, pdu;
    logic [31:0] st, v, lo, hi;
    repeat (3) @(posedge clk);
    @(negedge clk) aresetn = 1;

    // all registers read zero after reset
    for (int i = 0; i < NUM_REGS; i++) begin
      axi_read(i, v);
      check(v == 0, $sformatf("register %0d not zero after reset", i));
    end

    for (int t = 0; t < 4; t++) begin
      key  = {$urandom, $urandom, $urandom, $urandom};
      data = {$urandom, $urandom, $urandom, $urandom};
      id   = 11'($urandom);
      fv   = 11'($urandom);
      exp  = pdu_ref(key, data[31:0], id, fv);

      // ---- send
      load(key, id, fv, data, 64'h0);
      run_op(1, st);
      axi_read(REG_PDU_OUT0, lo, (t == 0) ? 3 : 0);
      axi_read(REG_PDU_OUT0 + 1, hi);
      pdu = {hi, lo};
      check(pdu == exp, $sformatf("PDU %h expected %h", pdu, exp));
      check(st[1] == 1'b0, "status set in send mode");
      n_send++;
      stop_op();

      // ---- receive the genuine PDU
      axi_write(REG_PDU_IN0, pdu[31:0]);
      axi_write(REG_PDU_IN0 + 1, pdu[63:32], 4'hf, (t == 0) ? 3 : 0);
      run_op(0, st);
      axi_read(REG_DATAOUT, v);
      check(st[1] && v == data[31:0], "genuine PDU not accepted");
      if (st[1]) n_accept++;
      stop_op();

      // ---- receive a tampered PDU (one payload byte changed via byte strobe)
      // the unselected bytes carry garbage that must not be written
      axi_write(REG_PDU_IN0 + 1, ~pdu[63:32] ^ 32'hff00_0000, 4'b0100);
      axi_read(REG_PDU_IN0 + 1, v);
      check(v == {pdu[63:56], pdu[55:48] ^ 8'hff, pdu[47:32]}, "byte strobe write");
      n_strobe++;
      run_op(0, st);
      axi_read(REG_DATAOUT, v);
      check(!st[1] && v == 0, "tampered PDU accepted");
      if (!st[1]) n_reject_mac++;
      stop_op();

      // ---- replay: genuine PDU, but the receiver's freshness value moved on
      axi_write(REG_PDU_IN0 + 1, pdu[63:32]);
      axi_write(REG_ID_FV, {5'b0, id, 5'b0, fv + 11'd1});
      run_op(0, st);
      check(!st[1], "replayed PDU accepted");
      if (!st[1]) n_reject_fv++;
      stop_op();
    end

    // ---- read-only registers ignore writes
    axi_write(REG_STATUS, 32'hffff_ffff);
    axi_write(REG_DATAOUT, 32'hffff_ffff);
    axi_read(REG_STATUS, st);
    axi_read(REG_DATAOUT, v);
    check(st == 0 && v == 0, "read-only register was written");
    n_ro_write++;

    // ---- software reset in the middle of an operation
    axi_write(REG_CTRL, 32'h3);                 // send, ce
    repeat (10) @(posedge clk);
    axi_write(REG_CTRL, 32'h7);                 // plus reset
    repeat (60) @(posedge clk);
    axi_read(REG_STATUS, st);
    check(st[0] == 1'b0, "software reset did not hold the core");
    if (st[0] == 1'b0) n_soft_reset++;
    axi_write(REG_CTRL, 32'h0);
    run_op(1, st);                               // runs normally afterwards
    stop_op();

    $display("send=%0d accept=%0d reject_mac=%0d reject_fv=%0d soft_reset=%0d ro_write=%0d strobe=%0d b_stall=%0d r_stall=%0d",
             n_send, n_accept, n_reject_mac, n_reject_fv, n_soft_reset, n_ro_write, n_strobe,
             n_b_stall, n_r_stall);
    check(n_send > 0, "no send happened");
    check(n_accept > 0, "no accepted receive happened");
    check(n_reject_mac > 0, "no MAC rejection happened");
    check(n_reject_fv > 0, "no freshness rejection happened");
    check(n_soft_reset > 0, "no software reset happened");
    check(n_ro_write > 0, "no read-only write happened");
    check(n_strobe > 0, "no byte-strobe write happened");
    check(n_b_stall > 0, "no write-response back-pressure happened");
    check(n_r_stall > 0, "no read-data back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
