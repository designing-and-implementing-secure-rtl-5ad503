// axil_master_if: AXI4-Lite master bundle with blocking bus-functional tasks,
// for testbenches that play a processor driving a register peripheral.
//
// write(idx, val) and read(idx, val) perform one transaction on 32-bit
// register index idx (byte address 4 * idx). Each drives its valid signals
// on a falling edge, waits for the handshake, and takes the response with
// READY held high. They count a transaction whose handshake or response does
// not arrive within 50 cycles in 'errors', and a response other than OKAY.
interface axil_master_if (input logic clk);
  logic [5:0]  awaddr = '0, araddr = '0;
  logic [2:0]  awprot = '0, arprot = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] rdata;
  logic [1:0]  bresp, rresp;
  int          errors = 0;

  task automatic write(int unsigned idx, logic [31:0] val);
    int n = 0;
    @(negedge clk);
    awaddr = 6'(idx * 4); wdata = val; wstrb = 4'hf;
    awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do begin @(posedge clk); n++; end while (!(awready && wready) && n < 50);
    #1 awvalid = 1'b0; wvalid = 1'b0;
    n = 0;
    while (!bvalid && n < 50) begin @(posedge clk); #1 n++; end
    if (!bvalid || bresp != 2'b00) errors++;
    @(posedge clk); #1 bready = 1'b0;
  endtask

  task automatic read(int unsigned idx, output logic [31:0] val);
    int n = 0;
    @(negedge clk);
    araddr = 6'(idx * 4); arvalid = 1'b1; rready = 1'b1;
    do begin @(posedge clk); n++; end while (!arready && n < 50);
    #1 arvalid = 1'b0;
    n = 0;
    while (!rvalid && n < 50) begin @(posedge clk); #1 n++; end
    val = rdata;
    if (!rvalid || rresp != 2'b00) errors++;
    @(posedge clk); #1 rready = 1'b0;
  endtask
endinterface
