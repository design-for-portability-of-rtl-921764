// tb_cb_axil_slave: self-checking test of the AXI4-Lite front end.
// A 64-word memory behind the internal bus answers reads one cycle after
// bus_re, like the ComBlock resources. The test writes random words with
// random byte strobes, reads them back with and without back-pressure, and
// checks the data, the bus strobes (exactly one per transaction) and the
// transaction latency (2 cycles per write, 3 per read without stalls).
module tb_cb_axil_slave;
  localparam int AW = 19;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic [AW-1:0] awaddr, araddr;
  logic [2:0]    awprot, arprot;
  logic          awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0]   wdata, rdata;
  logic [3:0]    wstrb;
  logic [1:0]    bresp, rresp;
  logic [AW-3:0] bus_addr;
  logic          bus_we, bus_re;
  logic [31:0]   bus_wdata, bus_rdata;
  logic [3:0]    bus_wstrb;

  cb_axil_slave #(.AXI_AW(AW)) dut (
    .aclk, .aresetn,
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .bus_addr, .bus_we, .bus_wdata, .bus_wstrb, .bus_re, .bus_rdata
  );

  axil_master #(.AW(AW)) m (
    .aclk, .awaddr, .awprot, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arprot, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  // Bus-side memory with registered read data.
  logic [31:0] mem [64];
  int n_we, n_re;
  always_ff @(posedge aclk) begin
    if (bus_we) begin
      n_we <= n_we + 1;
      for (int b = 0; b < 4; b++) if (bus_wstrb[b]) mem[bus_addr[5:0]][b*8 +: 8] <= bus_wdata[b*8 +: 8];
    end
    if (bus_re) begin
      n_re <= n_re + 1;
      bus_rdata <= mem[bus_addr[5:0]];
    end
  end

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d, v;
    logic [3:0]  s;
    int w, nw, nr;
    n_we = 0; n_re = 0;
    for (int i = 0; i < 64; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // plain writes and reads at every word, with latency checks
    for (int i = 0; i < 64; i++) begin
      v = $urandom;
      m.write(i, v);
      check(m.last_cycles == 2, $sformatf("write latency %0d", m.last_cycles));
      ref_mem[i] = v;
    end
    for (int i = 0; i < 64; i++) begin
      m.read(i, d);
      check(d == ref_mem[i], $sformatf("read word %0d: %h vs %h", i, d, ref_mem[i]));
      check(m.last_cycles == 3, $sformatf("read latency %0d", m.last_cycles));
    end
    // byte strobes and back-pressure
    m.stall = 1;
    for (int k = 0; k < 200; k++) begin
      w = $urandom_range(63);
      if ($urandom_range(1)) begin
        v = $urandom; s = 4'($urandom);
        m.write(w, v, s);
        for (int b = 0; b < 4; b++) if (s[b]) ref_mem[w][b*8 +: 8] = v[b*8 +: 8];
      end else begin
        m.read(w, d);
        check(d == ref_mem[w], $sformatf("stalled read word %0d: %h vs %h", w, d, ref_mem[w]));
      end
    end
    // one bus strobe per transaction
    nw = n_we; nr = n_re;
    m.write(5, 32'h1234_5678);
    m.read(5, d);
    repeat (2) @(posedge aclk);
    check(n_we == nw + 1 && n_re == nr + 1, "one strobe per transaction");
    check(d == 32'h1234_5678, "last read");
    check(m.resp_errors == 0, "all responses OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
