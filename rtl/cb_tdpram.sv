// cb_tdpram: true dual port RAM of the ComBlock.
//
// Two fully independent ports, each with its own clock, address, write enable
// and data: port A serves the uP side, port B the FPGA side. Each port reads
// synchronously: the word at the address presented in one cycle appears on the
// output after the next clock edge. A write on a port returns the old contents
// on that port's output (read-first). When both ports write the same word in
// the same instant the result is undefined, as in any true dual port block RAM;
// the transfer protocol of the logical level exists to avoid such collisions.
// The memory array is written from two clocked processes, one per port: this
// is the standard description of a true dual port block RAM, so the lint
// warning about an array driven from two clocks is expected here.
//
// The document gives the widths (32-bit data, 16-bit address, so 65536 words);
// the read-first behaviour and the enable-per-port interface are this design's.
module cb_tdpram #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 16
) (
  input  logic          clk_a,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] wdata_a,
  output logic [DW-1:0] rdata_a,
  input  logic          clk_b,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] wdata_b,
  output logic [DW-1:0] rdata_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      rdata_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end
endmodule
