// comblock: communication block between a processor (uP) and FPGA logic in a
// SoC FPGA.
//
// The block hides the SoC interconnect from the FPGA designer. On the uP side
// it is one AXI4-Lite slave; on the FPGA side it offers plain native ports.
// Both sides see the same resources at the same word offsets:
//   0x00..0x0F  M2F registers  -> reg_o          (uP writes, FPGA reads)
//   0x10..0x1F  F2M registers  <- reg_i          (FPGA writes, uP reads)
//   0x20        M2F FIFO       -> fifo_re_i / fifo_data_o (uP pushes)
//   0x21        F2M FIFO       <- fifo_we_i / fifo_data_i (uP pops)
//   0x22..      TDPRAM, 2**RAM_AW words, port B on ram_*_i / ram_data_o
// A uP read of 0x20 (the M2F FIFO is write-only for the uP) returns the FIFO
// status word: bit0 M2F full, bit1 M2F almost full, bit2 M2F overflow,
// bit3 F2M empty, bit4 F2M almost empty, bit5 F2M underflow.
//
// Clocks: s_axi_aclk for the uP side, the registers and TDPRAM port A;
// fifo_clk_i for the FPGA side of both FIFOs; ram_clk_i for TDPRAM port B.
// pl_reset_o is the bus reset synchronized into fifo_clk_i (active high), for
// resetting the FPGA subsystem.
// Timing on the FPGA side: reg_o follows a uP write one bus cycle after the
// write strobe; reg_i is sampled on every bus clock; ram_data_o and
// fifo_data_o are registered (valid one cycle after the address or fifo_re_i).
// TDPRAM port B is always enabled.
//
// The resources, their map, the port names and the default sizes (32-bit
// registers, 32 x 64K TDPRAM, 16 x 1024 FIFOs with almost-full/empty offsets
// of 1, F2M FIFO enabled and M2F FIFO disabled) follow the document's
// configuration. The single AXI4-Lite slave (the vendor instance has three),
// the status word at 0x20 and whole-word RAM writes are this design's choices.
module comblock
  import comblock_pkg::*;
#(
  parameter int unsigned AXI_AW          = 19,
  parameter int unsigned N_M2F           = 16,
  parameter int unsigned N_F2M           = 16,
  parameter bit          ENABLE_DRAM     = 1'b1,
  parameter int unsigned RAM_DW          = 32,
  parameter int unsigned RAM_AW          = 16,
  parameter bit          ENABLE_F2M_FIFO = 1'b1,
  parameter bit          ENABLE_M2F_FIFO = 1'b0,
  parameter int unsigned FIFO_DW         = 16,
  parameter int unsigned FIFO_DEPTH      = 1024,
  parameter int unsigned FIFO_AE_OFFSET  = 1,
  parameter int unsigned FIFO_AF_OFFSET  = 1
) (
  // uP side: AXI4-Lite
  input  logic                s_axi_aclk,
  input  logic                s_axi_aresetn,
  input  logic [AXI_AW-1:0]   s_axi_awaddr,
  input  logic [2:0]          s_axi_awprot,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [AXI_AW-1:0]   s_axi_araddr,
  input  logic [2:0]          s_axi_arprot,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // FPGA side: registers
  output logic [31:0]         reg_o [N_M2F],
  input  logic [31:0]         reg_i [N_F2M],
  // FPGA side: TDPRAM port B
  input  logic                ram_clk_i,
  input  logic                ram_we_i,
  input  logic [RAM_AW-1:0]   ram_addr_i,
  input  logic [RAM_DW-1:0]   ram_data_i,
  output logic [RAM_DW-1:0]   ram_data_o,
  // FPGA side: FIFOs
  input  logic                fifo_clk_i,
  input  logic                fifo_clear_i,
  input  logic                fifo_we_i,
  input  logic [FIFO_DW-1:0]  fifo_data_i,
  output logic                fifo_full_o,
  output logic                fifo_afull_o,
  output logic                fifo_overflow_o,
  input  logic                fifo_re_i,
  output logic [FIFO_DW-1:0]  fifo_data_o,
  output logic                fifo_empty_o,
  output logic                fifo_aempty_o,
  output logic                fifo_underflow_o,
  output logic                pl_reset_o
);
  localparam int unsigned WA = AXI_AW - 2;  // word address bits

  typedef enum logic [2:0] {SRC_NONE, SRC_REGS, SRC_STATUS, SRC_FIFO, SRC_RAM} src_e;

  logic [WA-1:0] bus_addr;
  logic          bus_we, bus_re;
  logic [31:0]   bus_wdata, bus_rdata;
  logic [3:0]    bus_wstrb;
  logic          rst;

  assign rst = !s_axi_aresetn;

  cb_axil_slave #(.AXI_AW(AXI_AW), .AXI_DW(32)) u_axi (
    .aclk(s_axi_aclk), .aresetn(s_axi_aresetn),
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .bus_addr, .bus_we, .bus_wdata, .bus_wstrb, .bus_re, .bus_rdata
  );

  // ---------------- address decode ----------------
  logic sel_regs, sel_m2f_fifo, sel_f2m_fifo, sel_ram;
  logic [WA-1:0] ram_off;

  assign ram_off      = bus_addr - WA'(RAM_BASE);
  assign sel_regs     = (32'(bus_addr) < F2M_REG_BASE + REG_SLOTS);
  assign sel_m2f_fifo = (32'(bus_addr) == M2F_FIFO_ADDR);
  assign sel_f2m_fifo = (32'(bus_addr) == F2M_FIFO_ADDR);
  assign sel_ram      = ENABLE_DRAM && (32'(bus_addr) >= RAM_BASE) &&
                        ((32'(ram_off) >> RAM_AW) == 0);

  // ---------------- registers ----------------
  logic [31:0] regs_rdata;
  cb_regs #(.N_M2F(N_M2F), .N_F2M(N_F2M), .DW(32)) u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .sel(sel_regs),
    .bus_addr(bus_addr[4:0]), .bus_we, .bus_wdata, .bus_wstrb, .bus_re,
    .bus_rdata(regs_rdata), .m2f_o(reg_o), .f2m_i(reg_i)
  );

  // ---------------- FIFOs ----------------
  logic               m2f_full, m2f_afull, m2f_overflow;
  logic               f2m_empty, f2m_aempty, f2m_underflow;
  logic [FIFO_DW-1:0] f2m_rdata;
  logic [5:0]         status_d;
  logic [31:0]        status_q;

  if (ENABLE_M2F_FIFO) begin : g_m2f_fifo
    cb_async_fifo #(.DW(FIFO_DW), .DEPTH(FIFO_DEPTH), .AE_OFFSET(FIFO_AE_OFFSET),
                    .AF_OFFSET(FIFO_AF_OFFSET)) u_m2f_fifo (
      .rst, .clear(fifo_clear_i),
      .wr_clk(s_axi_aclk), .wr_en(bus_we && sel_m2f_fifo), .wr_data(bus_wdata[FIFO_DW-1:0]),
      .full(m2f_full), .afull(m2f_afull), .overflow(m2f_overflow),
      .rd_clk(fifo_clk_i), .rd_en(fifo_re_i), .rd_data(fifo_data_o),
      .empty(fifo_empty_o), .aempty(fifo_aempty_o), .underflow(fifo_underflow_o)
    );
  end else begin : g_no_m2f_fifo
    assign {m2f_full, m2f_afull, m2f_overflow} = 3'b110;
    assign fifo_data_o      = '0;
    assign fifo_empty_o     = 1'b1;
    assign fifo_aempty_o    = 1'b1;
    assign fifo_underflow_o = 1'b0;
    logic unused_re;
    assign unused_re = fifo_re_i;
  end

  if (ENABLE_F2M_FIFO) begin : g_f2m_fifo
    cb_async_fifo #(.DW(FIFO_DW), .DEPTH(FIFO_DEPTH), .AE_OFFSET(FIFO_AE_OFFSET),
                    .AF_OFFSET(FIFO_AF_OFFSET)) u_f2m_fifo (
      .rst, .clear(fifo_clear_i),
      .wr_clk(fifo_clk_i), .wr_en(fifo_we_i), .wr_data(fifo_data_i),
      .full(fifo_full_o), .afull(fifo_afull_o), .overflow(fifo_overflow_o),
      .rd_clk(s_axi_aclk), .rd_en(bus_re && sel_f2m_fifo), .rd_data(f2m_rdata),
      .empty(f2m_empty), .aempty(f2m_aempty), .underflow(f2m_underflow)
    );
  end else begin : g_no_f2m_fifo
    assign {f2m_empty, f2m_aempty, f2m_underflow} = 3'b110;
    assign f2m_rdata       = '0;
    assign fifo_full_o     = 1'b1;
    assign fifo_afull_o    = 1'b1;
    assign fifo_overflow_o = 1'b0;
  end

  assign status_d = {f2m_underflow, f2m_aempty, f2m_empty, m2f_overflow, m2f_afull, m2f_full};

  // ---------------- TDPRAM ----------------
  logic [RAM_DW-1:0] ram_rdata_a;
  if (ENABLE_DRAM) begin : g_ram
    cb_tdpram #(.DW(RAM_DW), .AW(RAM_AW)) u_ram (
      .clk_a(s_axi_aclk), .en_a(sel_ram && (bus_we || bus_re)), .we_a(bus_we),
      .addr_a(ram_off[RAM_AW-1:0]), .wdata_a(bus_wdata[RAM_DW-1:0]), .rdata_a(ram_rdata_a),
      .clk_b(ram_clk_i), .en_b(1'b1), .we_b(ram_we_i),
      .addr_b(ram_addr_i), .wdata_b(ram_data_i), .rdata_b(ram_data_o)
    );
  end else begin : g_no_ram
    assign ram_rdata_a = '0;
    assign ram_data_o  = '0;
  end

  // ---------------- read data return ----------------
  src_e src_q;
  always_ff @(posedge s_axi_aclk or negedge s_axi_aresetn) begin
    if (!s_axi_aresetn) begin
      src_q    <= SRC_NONE;
      status_q <= '0;
    end else if (bus_re) begin
      status_q <= 32'(status_d);
      if (sel_regs)          src_q <= SRC_REGS;
      else if (sel_m2f_fifo) src_q <= SRC_STATUS;
      else if (sel_f2m_fifo) src_q <= SRC_FIFO;
      else if (sel_ram)      src_q <= SRC_RAM;
      else                   src_q <= SRC_NONE;
    end
  end

  always_comb begin
    unique case (src_q)
      SRC_REGS:   bus_rdata = regs_rdata;
      SRC_STATUS: bus_rdata = status_q;
      SRC_FIFO:   bus_rdata = 32'(f2m_rdata);
      SRC_RAM:    bus_rdata = 32'(ram_rdata_a);
      default:    bus_rdata = '0;
    endcase
  end

  // ---------------- reset for the FPGA subsystem ----------------
  logic pl_rst_n;
  cb_sync u_plrst (.clk(fifo_clk_i), .rst(rst), .d(1'b1), .q(pl_rst_n));
  assign pl_reset_o = !pl_rst_n;

  logic unused_wstrb;
  assign unused_wstrb = ^{bus_wdata, bus_addr};
endmodule
