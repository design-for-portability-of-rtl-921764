// axil_master: AXI4-Lite master for testbenches.
//
// write(addr, data) and read(addr, data) perform one transaction each, with
// address and data offered in the same cycle. When stall is set, BREADY and
// RREADY are held low for a few random cycles to exercise back-pressure.
// Transaction counters let a testbench check latency.
module axil_master #(
  parameter int unsigned AW = 19
) (
  input  logic          aclk,
  output logic [AW-1:0] awaddr,
  output logic [2:0]    awprot,
  output logic          awvalid,
  input  logic          awready,
  output logic [31:0]   wdata,
  output logic [3:0]    wstrb,
  output logic          wvalid,
  input  logic          wready,
  input  logic [1:0]    bresp,
  input  logic          bvalid,
  output logic          bready,
  output logic [AW-1:0] araddr,
  output logic [2:0]    arprot,
  output logic          arvalid,
  input  logic          arready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rvalid,
  output logic          rready
);
  bit stall = 0;
  int last_cycles;   // cycles from valid to response of the last transaction
  int resp_errors;

  initial begin
    awaddr = '0; awprot = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0;
    bready = 0; araddr = '0; arprot = '0; arvalid = 0; rready = 0;
    resp_errors = 0;
  end

  // Signals are driven and sampled just after the falling edge, so every
  // handshake completes on the following rising edge without races.
  // Word offset of the ComBlock map -> byte address.
  task automatic write(input int unsigned word, input logic [31:0] d,
                       input logic [3:0] strb = 4'hF);
    int n = 1;
    @(negedge aclk);
    awaddr = AW'(word << 2); wdata = d; wstrb = strb;
    awvalid = 1; wvalid = 1;
    #1;  // let the slave's combinational ready settle
    while (!(awready && wready)) begin @(negedge aclk); n++; end
    @(negedge aclk); n++;
    awvalid = 0; wvalid = 0;
    if (stall) repeat ($urandom_range(3)) begin @(negedge aclk); n++; end
    bready = 1;
    while (!bvalid) begin @(negedge aclk); n++; end
    if (bresp != 2'b00) resp_errors++;
    @(negedge aclk);
    bready = 0;
    last_cycles = n;
  endtask

  task automatic read(input int unsigned word, output logic [31:0] d);
    int n = 1;
    @(negedge aclk);
    araddr = AW'(word << 2); arvalid = 1;
    #1;
    while (!arready) begin @(negedge aclk); n++; end
    @(negedge aclk); n++;
    arvalid = 0;
    if (stall) repeat ($urandom_range(3)) begin @(negedge aclk); n++; end
    rready = 1;
    while (!rvalid) begin @(negedge aclk); n++; end
    d = rdata;
    if (rresp != 2'b00) resp_errors++;
    @(negedge aclk);
    rready = 0;
    last_cycles = n;
  endtask

  logic unused;
  assign unused = ^{bresp, rresp};
endmodule
