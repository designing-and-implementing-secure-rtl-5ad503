// tb_aes128: self-checking testbench of the AES-128 core.
//
// Checks the FIPS-197 (Appendix B and C.1) and SP 800-38A/38B known answers,
// then random key/plaintext pairs against the reference model in
// aes_ref_pkg. For every block it also checks that last_round rises exactly
// 11 cycles after ce, that it stays high with the cipher held, and that
// dropping ce clears it.
`timescale 1ns/1ps
module tb_aes128;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  logic [127:0] key, msg, cipher;
  logic last_round;
  int checks = 0, failures = 0;

  aes128 dut (.clk, .rst, .ce, .key, .msg, .cipher, .last_round);

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

  task automatic run(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int n = 0;
    key = k; msg = p;
    @(negedge clk) ce = 1;
    while (!last_round && n < 100) begin
      @(posedge clk); #1 n++;
    end
    check(n == 11, $sformatf("latency %0d cycles, expected 11", n));
    check(cipher == exp, $sformatf("key %h pt %h: got %h expected %h", k, p, cipher, exp));
    key = ~k; msg = ~p;                       // inputs may change once running
    repeat (3) @(posedge clk);
    #1 check(last_round && cipher == exp, "result not held while ce high");
    @(negedge clk) ce = 0;
    @(posedge clk); #1 check(!last_round, "last_round not cleared by ce low");
  endtask

  initial begin
    key = '0; msg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(aes_ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model FIPS-197 C.1");
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0,
        128'h7df76b0c1ab899b33e42f047b91b546f);
    run(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    for (int i = 0; i < 20; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes_ref_encrypt(k, p));
    end
    // synchronous reset clears a running core
    @(negedge clk) ce = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1;
    @(posedge clk); #1 check(!last_round && cipher == '0, "rst clears the core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
