// tb_secoc_receiver: self-checking testbench of the SecOC receiver.
//
// PDUs made by the reference model must be accepted (status 1, data_out the
// zero-padded payload). Each of these must be rejected, with data_out zero:
// a flipped data bit, a flipped TMAC bit, a TFV that differs from the local
// freshness value (a replayed frame), a different ID and a different key.
// The verdict must be ready 44 cycles after ce rises.
`timescale 1ns/1ps
module tb_secoc_receiver;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] FV, ID;
  logic [127:0] key, data_out;
  logic [63:0] PDU;
  logic last_round, status;
  int checks = 0, failures = 0;
  int accepted = 0, rejected = 0;

  secoc_receiver dut (.clk, .rst, .ce, .FV, .ID, .PDU, .key, .data_out, .last_round, .status);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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

  task automatic receive(logic [63:0] pdu, logic [127:0] k, logic [10:0] id, logic [10:0] fv,
                         bit expect_ok, string what);
    int n = 0;
    PDU = pdu; key = k; ID = id; FV = fv;
    @(negedge clk) ce = 1;
    while (!last_round && n < 200) begin
      @(posedge clk); #1 n++;
    end
    check(n == 44, $sformatf("%s: latency %0d, expected 44", what, n));
    check(status == expect_ok, $sformatf("%s: status %0b expected %0b", what, status, expect_ok));
    check(data_out == (expect_ok ? {96'b0, pdu[63:32]} : 128'b0),
          $sformatf("%s: data_out %h", what, data_out));
    if (status) accepted++; else rejected++;
    @(negedge clk) ce = 0;
    @(posedge clk); #1 check(!last_round && !status, "outputs not cleared by ce low");
  endtask

  initial begin
    logic [127:0] k;
    logic [31:0] d;
    logic [10:0] id, fv;
    logic [63:0] p;
    key = '0; PDU = '0; ID = '0; FV = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 6; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      d  = $urandom;
      id = 11'($urandom);
      fv = 11'($urandom);
      p  = pdu_ref(k, d, id, fv);
      receive(p, k, id, fv, 1, "genuine PDU");
      receive(p ^ (64'h1 << (32 + $urandom_range(31))), k, id, fv, 0, "data bit flipped");
      receive(p ^ (64'h1 << $urandom_range(20)), k, id, fv, 0, "TMAC bit flipped");
      receive(p, k, id, fv + 11'd1, 0, "stale freshness value");
      receive(p, k, id ^ 11'h1, fv, 0, "wrong ID");
      receive(p, k ^ 128'h1, id, fv, 0, "wrong key");
    end
    $display("accepted %0d, rejected %0d", accepted, rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
