// tb_comblock: self-checking test of the communication block through its two
// faces: an AXI4-Lite master on the uP side (10 ns clock) and direct use of
// the native ports on the FPGA side (8 ns clock). Both FIFOs are enabled and
// made 16 deep so that full and empty are reached quickly. Checked:
//  - M2F registers reach reg_o; F2M registers driven on reg_i are read by the uP
//  - M2F FIFO: uP pushes at 0x20, FPGA pops in order; FIFO status word at 0x20
//  - F2M FIFO: FPGA pushes, uP pops at 0x21 in order; overflow on the FPGA
//    side when pushing into a full FIFO, underflow seen by the uP
//  - TDPRAM: words written by the uP at 0x22+i are read on port B and the
//    other way round, including the last word; the word past the end reads 0
//  - fifo_clear_i empties both FIFOs; pl_reset_o is released after reset
//  - AXI latency of 2 cycles per write and 3 per read
module tb_comblock;
  import comblock_pkg::*;
  localparam int AW = 19, FD = 16, RAW = 16;
  logic aclk = 0, fclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;
  always #4 fclk = ~fclk;

  logic [AW-1:0] awaddr, araddr;
  logic [2:0]    awprot, arprot;
  logic          awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0]   wdata, rdata;
  logic [3:0]    wstrb;
  logic [1:0]    bresp, rresp;
  logic [31:0]   reg_o [16];
  logic [31:0]   reg_i [16];
  logic          ram_we = 0;
  logic [RAW-1:0] ram_addr = 0;
  logic [31:0]   ram_wdata = 0, ram_rdata;
  logic          fifo_clear = 0, fifo_we = 0, fifo_re = 0;
  logic [15:0]   fifo_wdata = 0, fifo_rdata;
  logic          f_full, f_afull, f_overflow, f_empty, f_aempty, f_underflow, pl_reset;

  comblock #(.AXI_AW(AW), .RAM_AW(RAW), .ENABLE_M2F_FIFO(1'b1), .FIFO_DEPTH(FD)) dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .reg_o, .reg_i,
    .ram_clk_i(fclk), .ram_we_i(ram_we), .ram_addr_i(ram_addr), .ram_data_i(ram_wdata), .ram_data_o(ram_rdata),
    .fifo_clk_i(fclk), .fifo_clear_i(fifo_clear), .fifo_we_i(fifo_we), .fifo_data_i(fifo_wdata),
    .fifo_full_o(f_full), .fifo_afull_o(f_afull), .fifo_overflow_o(f_overflow),
    .fifo_re_i(fifo_re), .fifo_data_o(fifo_rdata), .fifo_empty_o(f_empty),
    .fifo_aempty_o(f_aempty), .fifo_underflow_o(f_underflow), .pl_reset_o(pl_reset)
  );

  axil_master #(.AW(AW)) m (
    .aclk, .awaddr, .awprot, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arprot, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic f_ram(input bit we, input int a, input logic [31:0] d, output logic [31:0] q);
    @(negedge fclk); ram_we = we; ram_addr = RAW'(a); ram_wdata = d;
    @(negedge fclk); ram_we = 0; q = ram_rdata;
  endtask

  task automatic f_push(input logic [15:0] d);
    @(negedge fclk); fifo_we = 1; fifo_wdata = d;
    @(negedge fclk); fifo_we = 0;
  endtask

  task automatic f_pop(output logic [15:0] d);
    @(negedge fclk); fifo_re = 1;
    @(negedge fclk); fifo_re = 0; d = fifo_rdata;
  endtask

  initial begin
    logic [31:0] d, v, q;
    logic [15:0] h;
    logic [31:0] words [8];
    for (int i = 0; i < 16; i++) reg_i[i] = 0;
    repeat (4) @(posedge aclk);
    check(pl_reset, "PL reset held during bus reset");
    aresetn = 1;
    repeat (4) @(posedge fclk);
    check(!pl_reset, "PL reset released");

    // ---- registers ----
    for (int i = 0; i < 16; i++) begin
      v = $urandom;
      m.write(M2F_REG_BASE + i, v);
      check(m.last_cycles == 2, "write latency");
      check(reg_o[i] == v, $sformatf("reg_o[%0d]", i));
      m.read(M2F_REG_BASE + i, d);
      check(d == v, "M2F read-back");
    end
    for (int i = 0; i < 16; i++) begin
      v = $urandom;
      reg_i[i] = v;
      m.read(F2M_REG_BASE + i, d);
      check(m.last_cycles == 3, "read latency");
      check(d == v, $sformatf("F2M reg %0d", i));
    end

    // ---- M2F FIFO ----
    m.read(M2F_FIFO_ADDR, d);
    check(!d[ST_M2F_FULL] && !d[ST_M2F_OVERFLOW], "M2F status after reset");
    check(f_empty && !f_underflow, "M2F FIFO empty on the FPGA side");
    for (int i = 0; i < 8; i++) begin words[i] = $urandom; m.write(M2F_FIFO_ADDR, words[i]); end
    repeat (4) @(posedge fclk);
    check(!f_empty, "M2F FIFO not empty after pushes");
    for (int i = 0; i < 8; i++) begin
      f_pop(h);
      check(h == words[i][15:0], $sformatf("M2F FIFO word %0d: %h vs %h", i, h, words[i][15:0]));
    end
    repeat (2) @(posedge fclk);
    check(f_empty && f_aempty, "M2F FIFO drained");
    f_pop(h);
    check(f_underflow, "FPGA underflow on M2F FIFO");
    for (int i = 0; i < FD + 1; i++) m.write(M2F_FIFO_ADDR, i);
    m.read(M2F_FIFO_ADDR, d);
    check(d[ST_M2F_FULL] && d[ST_M2F_AFULL] && d[ST_M2F_OVERFLOW], $sformatf("M2F status full/overflow %b", d[5:0]));

    // ---- F2M FIFO ----
    m.read(M2F_FIFO_ADDR, d);
    check(d[ST_F2M_EMPTY] && !d[ST_F2M_UNDERFLOW], "F2M status empty");
    for (int i = 0; i < 8; i++) begin words[i] = $urandom; f_push(words[i][15:0]); end
    repeat (4) @(posedge aclk);
    for (int i = 0; i < 8; i++) begin
      m.read(F2M_FIFO_ADDR, d);
      check(d == {16'd0, words[i][15:0]}, $sformatf("F2M FIFO word %0d: %h", i, d));
    end
    m.read(M2F_FIFO_ADDR, d);
    check(d[ST_F2M_EMPTY], "F2M drained");
    m.read(F2M_FIFO_ADDR, d);
    m.read(M2F_FIFO_ADDR, d);
    check(d[ST_F2M_UNDERFLOW], "uP underflow on F2M FIFO");
    for (int i = 0; i < FD + 2; i++) f_push(16'(i));
    check(f_full && f_afull && f_overflow, "F2M full and overflow on the FPGA side");
    for (int i = 0; i < FD; i++) begin
      m.read(F2M_FIFO_ADDR, d);
      check(d == i, $sformatf("F2M word %0d after overflow: %0d", i, d));
    end

    // ---- clear ----
    f_push(16'h1111);
    m.write(M2F_FIFO_ADDR, 32'h2222);
    repeat (4) @(posedge aclk);
    @(negedge fclk); fifo_clear = 1;
    repeat (2) @(negedge fclk); fifo_clear = 0;
    repeat (6) @(posedge aclk);
    m.read(M2F_FIFO_ADDR, d);
    check(d[5:0] == 6'b011000, $sformatf("status after clear %b", d[5:0]));
    check(f_empty && !f_overflow && !f_underflow && !f_full, "FPGA flags after clear");

    // ---- TDPRAM ----
    for (int k = 0; k < 40; k++) begin
      int a;
      a = (k == 0) ? 0 : (k == 1) ? (2**RAW - 1) : $urandom_range(2**RAW - 1);
      v = $urandom;
      m.write(RAM_BASE + a, v);
      f_ram(0, a, 0, q);
      check(q == v, $sformatf("uP->FPGA RAM word %0d", a));
      v = $urandom;
      f_ram(1, a, v, q);
      m.read(RAM_BASE + a, d);
      check(d == v, $sformatf("FPGA->uP RAM word %0d", a));
      check(m.last_cycles == 3, "RAM read latency");
    end
    m.write(RAM_BASE + 2**RAW, 32'hFFFF_FFFF);   // past the end: ignored
    m.read(RAM_BASE + 2**RAW, d);
    check(d == 0, "word past the map reads zero");
    f_ram(0, 0, 0, q);
    check(q != 32'hFFFF_FFFF, "write past the end did not wrap");
    check(m.resp_errors == 0, "OKAY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
