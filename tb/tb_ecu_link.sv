// tb_ecu_link: two ECUs exchanging authenticated frames, with an attacker on
// the bus.
//
// ECU A and ECU B each have a SecOC peripheral driven over AXI4-Lite by
// their software, modelled here as tasks. Both share a key and a message ID.
// A's software keeps a freshness counter, sends a stream of payloads and
// puts each PDU on a modelled CAN bus; B's software keeps the freshness value
// it expects next, checks every frame and advances only on an accepted one.
// An attacker on the bus replays an earlier frame, flips a payload bit in
// flight, forges a frame with a guessed TMAC and sends a frame made with its
// own key. Every genuine frame must be delivered with its payload and match
// the reference PDU; every attack must be rejected; at the end B's
// freshness value must equal A's. Each kind of event is counted and must have
// happened at least once.
`timescale 1ns/1ps
module tb_ecu_link;
  import aes_ref_pkg::*;
  import secoc_pkg::*;

  logic clk = 0, aresetn = 0;
  int checks = 0, failures = 0;
  int n_sent = 0, n_delivered = 0, n_replay = 0, n_tamper = 0, n_forge = 0, n_badkey = 0;

  always #5 clk = ~clk;

  axil_master_if bus_a (clk);
  axil_master_if bus_b (clk);

  secoc_axi ecu_a (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(bus_a.awaddr), .s_axi_awprot(bus_a.awprot), .s_axi_awvalid(bus_a.awvalid),
    .s_axi_awready(bus_a.awready), .s_axi_wdata(bus_a.wdata), .s_axi_wstrb(bus_a.wstrb),
    .s_axi_wvalid(bus_a.wvalid), .s_axi_wready(bus_a.wready), .s_axi_bresp(bus_a.bresp),
    .s_axi_bvalid(bus_a.bvalid), .s_axi_bready(bus_a.bready), .s_axi_araddr(bus_a.araddr),
    .s_axi_arprot(bus_a.arprot), .s_axi_arvalid(bus_a.arvalid), .s_axi_arready(bus_a.arready),
    .s_axi_rdata(bus_a.rdata), .s_axi_rresp(bus_a.rresp), .s_axi_rvalid(bus_a.rvalid),
    .s_axi_rready(bus_a.rready));

  secoc_axi ecu_b (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(bus_b.awaddr), .s_axi_awprot(bus_b.awprot), .s_axi_awvalid(bus_b.awvalid),
    .s_axi_awready(bus_b.awready), .s_axi_wdata(bus_b.wdata), .s_axi_wstrb(bus_b.wstrb),
    .s_axi_wvalid(bus_b.wvalid), .s_axi_wready(bus_b.wready), .s_axi_bresp(bus_b.bresp),
    .s_axi_bvalid(bus_b.bvalid), .s_axi_bready(bus_b.bready), .s_axi_araddr(bus_b.araddr),
    .s_axi_arprot(bus_b.arprot), .s_axi_arvalid(bus_b.arvalid), .s_axi_arready(bus_b.arready),
    .s_axi_rdata(bus_b.rdata), .s_axi_rresp(bus_b.rresp), .s_axi_rvalid(bus_b.rvalid),
    .s_axi_rready(bus_b.rready));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  logic [127:0] key;
  logic [10:0]  id;
  logic [10:0]  fv_a, fv_b;         // sender's counter, receiver's expectation

  // ECU A software: send one payload, return the PDU it puts on the bus
  task automatic a_send(logic [31:0] payload, output logic [63:0] pdu);
    logic [31:0] st, lo, hi;
    int polls = 0;
    bus_a.write(REG_DATA0, payload);
    bus_a.write(REG_ID_FV, {5'b0, id, 5'b0, fv_a});
    bus_a.write(REG_CTRL, 32'h3);
    do begin bus_a.read(REG_STATUS, st); polls++; end while (!st[0] && polls < 40);
    bus_a.read(REG_PDU_OUT0, lo);
    bus_a.read(REG_PDU_OUT0 + 1, hi);
    bus_a.write(REG_CTRL, 32'h0);
    pdu = {hi, lo};
    check(pdu == pdu_ref(key, payload, id, fv_a), $sformatf("ECU A PDU %h wrong", pdu));
    fv_a = fv_a + 11'd1;
    n_sent++;
  endtask

  // ECU B software: check one frame from the bus
  task automatic b_receive(logic [63:0] pdu, output bit ok, output logic [31:0] payload);
    logic [31:0] st;
    int polls = 0;
    bus_b.write(REG_PDU_IN0, pdu[31:0]);
    bus_b.write(REG_PDU_IN0 + 1, pdu[63:32]);
    bus_b.write(REG_ID_FV, {5'b0, id, 5'b0, fv_b});
    bus_b.write(REG_CTRL, 32'h1);
    do begin bus_b.read(REG_STATUS, st); polls++; end while (!st[0] && polls < 40);
    bus_b.read(REG_DATAOUT, payload);
    bus_b.write(REG_CTRL, 32'h0);
    ok = st[1];
    if (ok) fv_b = fv_b + 11'd1;
  endtask

  initial begin
    logic [63:0] pdu, captured, forged;
    logic [31:0] payload, got;
    bit ok;
    repeat (3) @(posedge clk);
    @(negedge clk) aresetn = 1;
    key  = {$urandom, $urandom, $urandom, $urandom};
    id   = 11'h123;
    fv_a = 11'($urandom);
    fv_b = fv_a;
    for (int i = 0; i < 4; i++) begin
      bus_a.write(REG_KEY0 + i, key[32*i +: 32]);
      bus_b.write(REG_KEY0 + i, key[32*i +: 32]);
    end
    captured = '0;
    for (int m = 0; m < 8; m++) begin
      payload = $urandom;
      a_send(payload, pdu);
      if (m == 1) captured = pdu;
      b_receive(pdu, ok, got);
      check(ok && got == payload, $sformatf("frame %0d not delivered", m));
      if (ok) n_delivered++;
      unique case (m)
        3: begin                           // replay of frame 1
          b_receive(captured, ok, got);
          check(!ok && got == 0, "replayed frame accepted");
          if (!ok) n_replay++;
        end
        4: begin                           // payload bit flipped in flight
          a_send($urandom, pdu);
          b_receive(pdu ^ (64'h1 << (32 + $urandom_range(31))), ok, got);
          check(!ok, "tampered frame accepted");
          if (!ok) n_tamper++;
          // the receiver did not advance, so the sender's counter is now ahead;
          // resynchronise the way a real system would on its next valid frame
          fv_b = fv_a;
        end
        5: begin                           // forged frame with guessed TMAC
          forged = {32'hdead_beef, fv_b, 21'($urandom)};
          if (forged == pdu_ref(key, 32'hdead_beef, id, fv_b)) forged ^= 64'h1;
          b_receive(forged, ok, got);
          check(!ok, "forged frame accepted");
          if (!ok) n_forge++;
        end
        6: begin                           // frame made with the attacker's key
          b_receive(pdu_ref(~key, 32'h0bad_cafe, id, fv_b), ok, got);
          check(!ok, "frame with a wrong key accepted");
          if (!ok) n_badkey++;
        end
        default: ;
      endcase
    end
    check(fv_a == fv_b, "freshness values out of step at the end");
    check(bus_a.errors == 0 && bus_b.errors == 0, "bus transaction errors");
    $display("sent=%0d delivered=%0d replay=%0d tamper=%0d forge=%0d badkey=%0d",
             n_sent, n_delivered, n_replay, n_tamper, n_forge, n_badkey);
    check(n_delivered == 8, "not every genuine frame was delivered");
    check(n_replay > 0 && n_tamper > 0 && n_forge > 0 && n_badkey > 0, "an attack never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
