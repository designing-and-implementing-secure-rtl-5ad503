// tb_secoc_sender: self-checking testbench of the SecOC sender.
//
// For random keys, IDs, freshness values and 32-bit payloads (zero-padded,
// and also with non-zero upper bits, which enter the MAC but are not sent)
// the PDU must equal {data[31:0], FV, MAC[20:0]} from the reference model,
// 44 cycles after ce rises.
`timescale 1ns/1ps
module tb_secoc_sender;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] FV, ID;
  logic [127:0] data, key, m;
  logic [63:0] PDU, exp;
  logic last_round;
  int checks = 0, failures = 0;

  secoc_sender dut (.clk, .rst, .ce, .FV, .ID, .data, .key, .PDU, .last_round);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  initial begin
    key = '0; data = '0; ID = '0; FV = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 12; i++) begin
      int n;
      n    = 0;
      key  = {$urandom, $urandom, $urandom, $urandom};
      data = {96'b0, 32'($urandom)};
      if (i % 3 == 2) data[127:96] = 32'($urandom) | 32'h1;
      ID   = 11'($urandom);
      FV   = 11'($urandom);
      m    = mac_ref(key, data, ID, FV);
      exp  = {data[31:0], FV, m[20:0]};
      @(negedge clk) ce = 1;
      while (!last_round && n < 200) begin
        @(posedge clk); #1 n++;
      end
      check(n == 44, $sformatf("latency %0d, expected 44", n));
      check(PDU == exp, $sformatf("PDU %h expected %h", PDU, exp));
      check(PDU[63:32] == data[31:0] && PDU[31:21] == FV, "PDU data/TFV fields misplaced");
      @(negedge clk) ce = 0;
      @(posedge clk); #1 check(!last_round, "last_round not cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
