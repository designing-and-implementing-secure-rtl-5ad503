// tb_secoc_top: self-checking testbench of the SecOC core with its mode
// switch.
//
// Sends random payloads in sender mode and checks PDU_out against the
// reference model, with the receiver idle (status 0). Then switches to
// receiver mode and feeds the same PDU back: it must be accepted with the
// payload on data_out. A tampered copy and a replay with an old freshness
// value must be rejected. Every operation must finish in 44 cycles.
`timescale 1ns/1ps
module tb_secoc_top;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0, mode_select = 0;
  logic [127:0] data_in, key;
  logic [10:0] ID, FV;
  logic [63:0] PDU_in, PDU_out;
  logic [31:0] data_out;
  logic status, last_round;
  int checks = 0, failures = 0;

  secoc_top dut (.clk, .rst, .ce, .mode_select, .data_in, .ID, .FV, .key, .PDU_in,
                 .PDU_out, .data_out, .status, .last_round);

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

  task automatic operate(bit mode);
    int n = 0;
    mode_select = mode;
    @(negedge clk) ce = 1;
    while (!last_round && n < 200) begin
      @(posedge clk); #1 n++;
    end
    check(n == 44, $sformatf("mode %0b: latency %0d, expected 44", mode, n));
  endtask

  task automatic finish_op();
    @(negedge clk) ce = 0;
    @(posedge clk); #1 check(!last_round, "last_round not cleared");
  endtask

  initial begin
    logic [63:0] exp;
    key = '0; data_in = '0; ID = '0; FV = '0; PDU_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 6; i++) begin
      key     = {$urandom, $urandom, $urandom, $urandom};
      // upper bits are not part of the payload and must be ignored
      data_in = {$urandom, $urandom, $urandom, $urandom};
      ID      = 11'($urandom);
      FV      = 11'($urandom);
      exp     = pdu_ref(key, data_in[31:0], ID, FV);
      operate(1);
      check(PDU_out == exp, $sformatf("PDU_out %h expected %h", PDU_out, exp));
      check(!status, "receiver active in sender mode");
      finish_op();
      PDU_in = PDU_out;
      operate(0);
      check(status && data_out == data_in[31:0], "own PDU not accepted by receiver");
      finish_op();
      PDU_in = exp ^ 64'h0000_0100_0000_0000;
      operate(0);
      check(!status && data_out == 0, "tampered PDU accepted");
      finish_op();
      PDU_in = exp;
      FV = FV + 11'd1;
      operate(0);
      check(!status && data_out == 0, "replayed PDU accepted");
      finish_op();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
