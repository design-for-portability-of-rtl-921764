// daq_top: a SoC FPGA data acquisition subsystem built around the ComBlock.
//
// The processor (outside, on the AXI4-Lite port) and the FPGA logic talk only
// through the ComBlock. The FPGA side holds the example acquisition chain:
// ADC samples (adc_valid/adc_data, from the ADC controller outside) are
// decimated; the decimated stream is pushed into the F2M FIFO while
// acquisition is enabled and is histogrammed into the TDPRAM on request. The
// logical-level agent arbitrates TDPRAM port B between the histogrammer
// (FPGA -> uP blocks) and blocks sent by the uP (uP -> FPGA), which leave on
// the m2f_* stream. The M2F FIFO read side is brought out for FPGA logic
// outside (it is disabled in the default configuration).
//
// Register use (word offsets of the ComBlock map):
//   M2F 0: control. bit0 acquisition enable, bit1 histogram start (rising
//          edge), bit2 FIFO clear
//   M2F 1: log2 of the decimation ratio
//   M2F 2: number of samples to histogram
//   M2F 14, 15: length and flags of the uP side of the transfer protocol
//   F2M 0: status. bit0 histogram done, bit1 histogrammer busy,
//          bit2 F2M FIFO full, bit3 F2M FIFO overflow
//   F2M 1: samples histogrammed, F2M 2: samples dropped by the histogrammer,
//   F2M 3: decimated samples pushed into the F2M FIFO
//   F2M 14, 15: length and flags of the FPGA side of the transfer protocol
// The chain (ADC controller, decimator, histogrammer, ComBlock) follows the
// document's example system; the register assignment is this design's.
// Clocks: s_axi_aclk (uP side) and adc_clk (all FPGA logic, FIFO and RAM port
// B). Control words cross into adc_clk as quasi-static values: the uP sets
// ratio and sample count before it raises the enable or start bit, whose
// single bits are synchronized.
module daq_top
  import comblock_pkg::*;
#(
  parameter int unsigned AXI_AW     = 19,
  parameter int unsigned SW         = 16,
  parameter int unsigned RAM_AW     = 16,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic              s_axi_aclk,
  input  logic              s_axi_aresetn,
  input  logic [AXI_AW-1:0] s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [AXI_AW-1:0] s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // ADC controller side
  input  logic              adc_clk,
  input  logic              adc_valid,
  input  logic [SW-1:0]     adc_data,
  // blocks sent by the uP through the TDPRAM
  output logic              m2f_valid,
  output logic [31:0]       m2f_data,
  output logic              m2f_last,
  input  logic              m2f_ready,
  // M2F FIFO read side
  input  logic              m2f_fifo_re,
  output logic [15:0]       m2f_fifo_data,
  output logic              m2f_fifo_empty,
  output logic              m2f_fifo_aempty,
  output logic              m2f_fifo_underflow,
  output logic              histo_done
);
  logic [31:0] reg_o [16];
  logic [31:0] reg_i [16];
  logic        pl_reset;
  logic [2:0]  ctrl_s;     // control bits synchronized into adc_clk

  // RAM port B
  logic              ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [31:0]       ram_wdata, ram_rdata;

  // F2M FIFO write side
  logic        fifo_we, fifo_full, fifo_afull, fifo_overflow;
  logic [15:0] fifo_wdata;

  comblock #(.AXI_AW(AXI_AW), .RAM_AW(RAM_AW), .FIFO_DEPTH(FIFO_DEPTH)) u_cb (
    .s_axi_aclk, .s_axi_aresetn,
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .reg_o, .reg_i,
    .ram_clk_i(adc_clk), .ram_we_i(ram_we), .ram_addr_i(ram_addr),
    .ram_data_i(ram_wdata), .ram_data_o(ram_rdata),
    .fifo_clk_i(adc_clk), .fifo_clear_i(ctrl_s[2]),
    .fifo_we_i(fifo_we), .fifo_data_i(fifo_wdata),
    .fifo_full_o(fifo_full), .fifo_afull_o(fifo_afull), .fifo_overflow_o(fifo_overflow),
    .fifo_re_i(m2f_fifo_re), .fifo_data_o(m2f_fifo_data), .fifo_empty_o(m2f_fifo_empty),
    .fifo_aempty_o(m2f_fifo_aempty), .fifo_underflow_o(m2f_fifo_underflow),
    .pl_reset_o(pl_reset)
  );

  // ---------------- control crossing into adc_clk ----------------
  cb_sync #(.W(3)) u_ctrl_sync (.clk(adc_clk), .rst(pl_reset), .d(reg_o[0][2:0]), .q(ctrl_s));

  // ---------------- decimator ----------------
  logic          dec_valid;
  logic [SW-1:0] dec_data;
  logic [31:0]   dec_sum, fifo_pushes;

  cb_decimator #(.SW(SW)) u_dec (
    .clk(adc_clk), .rst(pl_reset), .en(ctrl_s[0]), .log2_ratio(reg_o[1][4:0]),
    .in_valid(adc_valid), .in_data(adc_data),
    .out_valid(dec_valid), .out_data(dec_data), .out_sum(dec_sum)
  );

  assign fifo_we    = dec_valid && ctrl_s[0];
  assign fifo_wdata = 16'(dec_data);

  always_ff @(posedge adc_clk or posedge pl_reset) begin
    if (pl_reset)                  fifo_pushes <= '0;
    else if (fifo_we && !fifo_full) fifo_pushes <= fifo_pushes + 1'b1;
  end

  // ---------------- histogrammer and logical-level agent ----------------
  logic              h_busy, h_req, h_grant, h_we, h_done_p, h_acked;
  logic [RAM_AW-1:0] h_addr;
  logic [31:0]       h_wdata, h_len, h_scount, h_dropped;
  logic [31:0]       fpga_flags, fpga_len;

  cb_histogrammer #(.SW(SW), .RAM_AW(RAM_AW), .RAM_DW(32)) u_hist (
    .clk(adc_clk), .rst(pl_reset), .start(ctrl_s[1]), .nsamples(reg_o[2]),
    .in_valid(dec_valid), .in_data(dec_data),
    .busy(h_busy), .done(histo_done), .scount(h_scount), .dropped(h_dropped),
    .prod_req(h_req), .prod_grant(h_grant),
    .ram_we(h_we), .ram_addr(h_addr), .ram_wdata(h_wdata), .ram_rdata(ram_rdata),
    .prod_done(h_done_p), .prod_len(h_len), .prod_acked(h_acked)
  );

  cb_logic_fpga #(.RAM_AW(RAM_AW), .RAM_DW(32)) u_logic (
    .clk(adc_clk), .rst(pl_reset),
    .up_flags_i(reg_o[FLAG_REG]), .up_len_i(reg_o[LEN_REG]),
    .fpga_flags_o(fpga_flags), .fpga_len_o(fpga_len),
    .prod_req_i(h_req), .prod_grant_o(h_grant),
    .prod_we_i(h_we), .prod_addr_i(h_addr), .prod_wdata_i(h_wdata),
    .prod_done_i(h_done_p), .prod_len_i(h_len), .prod_acked_o(h_acked),
    .cons_valid_o(m2f_valid), .cons_data_o(m2f_data), .cons_last_o(m2f_last),
    .cons_ready_i(m2f_ready),
    .ram_we_o(ram_we), .ram_addr_o(ram_addr), .ram_wdata_o(ram_wdata), .ram_rdata_i(ram_rdata)
  );

  // ---------------- status registers ----------------
  always_comb begin
    for (int i = 0; i < 16; i++) reg_i[i] = '0;
    reg_i[0]        = {28'd0, fifo_overflow, fifo_full, h_busy, histo_done};
    reg_i[1]        = h_scount;
    reg_i[2]        = h_dropped;
    reg_i[3]        = fifo_pushes;
    reg_i[LEN_REG]  = fpga_len;
    reg_i[FLAG_REG] = fpga_flags;
  end

  logic unused_top;
  assign unused_top = ^{dec_sum, fifo_afull, reg_o[0][31:3], reg_o[1][31:5]};
endmodule
