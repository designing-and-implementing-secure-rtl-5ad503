// tb_mac_manager: self-checking testbench of the MAC manager.
//
// Drives random keys, data blocks, IDs and freshness values and compares MAC
// with the reference model (four reference AES encryptions). Checks that the
// MAC is ready exactly 44 cycles after ce rises, that one-bit changes of ID,
// FV or data change the MAC, and that ce low clears last_round.
`timescale 1ns/1ps
module tb_mac_manager;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] FV, ID;
  logic [127:0] data, key, MAC;
  logic last_round;
  int checks = 0, failures = 0;

  mac_manager dut (.clk, .rst, .ce, .FV, .ID, .data, .key, .MAC, .last_round);

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

  task automatic run(logic [127:0] k, logic [127:0] d, logic [10:0] id, logic [10:0] fv,
                     output logic [127:0] mac);
    int n = 0;
    logic [127:0] exp;
    key = k; data = d; ID = id; FV = fv;
    exp = mac_ref(k, d, id, fv);
    @(negedge clk) ce = 1;
    while (!last_round && n < 200) begin
      @(posedge clk); #1 n++;
    end
    check(n == 44, $sformatf("latency %0d cycles, expected 44", n));
    check(MAC == exp, $sformatf("MAC %h expected %h", MAC, exp));
    mac = MAC;
    repeat (2) @(posedge clk);
    #1 check(last_round && MAC == exp, "MAC not held while ce high");
    @(negedge clk) ce = 0;
    @(posedge clk); #1 check(!last_round, "last_round not cleared");
  endtask

  initial begin
    logic [127:0] k, d, m0, m1;
    logic [10:0] id, fv;
    key = '0; data = '0; ID = '0; FV = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 8; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      d  = (i % 2 != 0) ? {96'b0, 32'($urandom)} : {$urandom, $urandom, $urandom, $urandom};
      id = 11'($urandom);
      fv = 11'($urandom);
      run(k, d, id, fv, m0);
      run(k, d, id ^ 11'h400, fv, m1);
      check(m0 != m1, "ID bit 10 does not change the MAC");
      run(k, d, id, fv ^ 11'h001, m1);
      check(m0 != m1, "FV bit 0 does not change the MAC");
      run(k, d ^ 128'h1, id, fv, m1);
      check(m0 != m1, "data bit 0 does not change the MAC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
