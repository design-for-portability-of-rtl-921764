// tb_daq_top: end-to-end test of the acquisition subsystem at its default
// sizes (64K-word TDPRAM, 1024-word FIFO). The testbench plays both the ADC
// (random samples on adc_clk, 8 ns) and the processor software (an AXI4-Lite
// master on s_axi_aclk, 10 ns), which uses only the ComBlock map.
//  A. Streaming: decimation by 4, samples pushed into the F2M FIFO until it
//     overflows; the uP reads the 1024 stored words and compares them with
//     means computed here; the FIFO is then cleared.
//  B. Histogram, FPGA -> uP block: decimation by 2, 300 samples binned; the uP
//     follows the flag protocol (wait data-ready-for-uP, claim, read all 64K
//     bins, release) and compares every bin with a reference histogram.
//  C. Histogram at full rate (no decimation): the histogrammer must drop
//     samples; the uP checks the counts add up.
//  D. uP -> FPGA block: the uP writes a block into the TDPRAM and hands it
//     over; it must leave on the m2f stream unchanged.
//  E. Deferred claim: while the uP holds the TDPRAM a histogram start must
//     not get the RAM until the uP releases it.
// Each mechanism is counted and must have happened at least once.
module tb_daq_top;
  import comblock_pkg::*;
  localparam int AW = 19;
  logic aclk = 0, fclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;
  always #4 fclk = ~fclk;

  logic [AW-1:0] awaddr, araddr;
  logic [2:0]    awprot, arprot;
  logic          awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0]   wdata, rdata;
  logic [3:0]    wstrb;
  logic [1:0]    bresp, rresp;
  logic          adc_valid = 0;
  logic [15:0]   adc_data = 0;
  logic          m2f_valid, m2f_last, m2f_ready = 0;
  logic [31:0]   m2f_data;
  logic          m2f_fifo_re = 0;
  logic [15:0]   m2f_fifo_data;
  logic          m2f_fifo_empty, m2f_fifo_aempty, m2f_fifo_underflow, histo_done;

  daq_top dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .adc_clk(fclk), .adc_valid, .adc_data,
    .m2f_valid, .m2f_data, .m2f_last, .m2f_ready,
    .m2f_fifo_re, .m2f_fifo_data, .m2f_fifo_empty, .m2f_fifo_aempty, .m2f_fifo_underflow,
    .histo_done
  );

  axil_master #(.AW(AW)) m (
    .aclk, .awaddr, .awprot, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arprot, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  int n_overflow = 0, n_clear = 0, n_drop = 0, n_f2m_block = 0, n_m2f_block = 0, n_deferred = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- ADC model and reference decimator ----------------
  logic [15:0] dec_ref[$];
  task automatic feed(input int n, input int l2);
    longint sum = 0;
    int cnt = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge fclk);
      adc_valid = 1; adc_data = 16'($urandom);
      sum += adc_data; cnt++;
      if (cnt == (1 << l2)) begin dec_ref.push_back(16'(sum >> l2)); sum = 0; cnt = 0; end
    end
    @(negedge fclk); adc_valid = 0;
  endtask

  // uP software helpers
  localparam int CTRL = 0, RATIO = 1, NSAMP = 2;
  task automatic set_ctrl(input bit en, input bit start, input bit clr);
    m.write(M2F_REG_BASE + CTRL, {29'd0, clr, start, en});
  endtask

  task automatic wait_f2m_bits(input int r, input logic [31:0] mask, input logic [31:0] value);
    logic [31:0] d;
    do m.read(F2M_REG_BASE + r, d); while ((d & mask) != value);
  endtask

  logic [31:0] up_flags = 0;
  task automatic up_flag(input int bit_i, input bit v);
    up_flags[bit_i] = v;
    m.write(M2F_REG_BASE + FLAG_REG, up_flags);
  endtask

  // claim the TDPRAM as the uP: raise busy, then wait for the FPGA busy flag low
  task automatic up_claim();
    up_flag(UP_BUSY_BIT, 1);
    wait_f2m_bits(FLAG_REG, 32'd1 << FPGA_BUSY_BIT, 0);
  endtask

  // receive a histogram block; returns the sum of all bins
  task automatic up_read_histogram(input bit compare, output longint total);
    logic [31:0] d, len;
    int ref_h [int];
    total = 0;
    if (compare) foreach (dec_ref[i]) if (i < 300) ref_h[dec_ref[i]] = ref_h.exists(dec_ref[i]) ? ref_h[dec_ref[i]] + 1 : 1;
    wait_f2m_bits(FLAG_REG, 32'b11, 32'b10);       // data ready for uP, FPGA not busy
    up_claim();
    m.read(F2M_REG_BASE + LEN_REG, len);
    check(len == 65536, $sformatf("histogram length %0d", len));
    for (int b = 0; b < int'(len); b++) begin
      m.read(RAM_BASE + b, d);
      total += d;
      if (compare) check(d == (ref_h.exists(b) ? ref_h[b] : 0), $sformatf("bin %0d: %0d", b, d));
    end
    up_flag(UP_BUSY_BIT, 0);
    wait_f2m_bits(FLAG_REG, 32'd1 << READY_FOR_UP_BIT, 0);
    n_f2m_block++;
  endtask

  // ---------------- m2f stream sink ----------------
  logic [31:0] m2f_ref[$];
  int m2f_got = 0, m2f_last_ok = 0;
  always @(negedge fclk) m2f_ready = ($urandom_range(2) != 0);
  always @(posedge fclk) begin
    if (m2f_valid && m2f_ready) begin
      if (m2f_ref.size() == 0) check(0, "unexpected m2f word");
      else begin
        check(m2f_data == m2f_ref[0], $sformatf("m2f word %h vs %h", m2f_data, m2f_ref[0]));
        if (m2f_last == (m2f_ref.size() == 1)) m2f_last_ok++;
        void'(m2f_ref.pop_front());
      end
      m2f_got++;
    end
  end

  initial begin
    logic [31:0] d;
    longint total;
    int n_dec;
    repeat (5) @(posedge aclk);
    aresetn = 1;
    repeat (10) @(posedge aclk);

    // ---------------- A. streaming through the F2M FIFO ----------------
    m.write(M2F_REG_BASE + RATIO, 2);
    set_ctrl(1, 0, 0);
    repeat (10) @(posedge fclk);
    dec_ref.delete();
    feed(4 * 1030, 2);
    repeat (10) @(posedge aclk);
    m.read(F2M_REG_BASE + 3, d);
    check(d == 1024, $sformatf("pushes into the F2M FIFO: %0d", d));
    m.read(F2M_REG_BASE + 0, d);
    if (d[3]) n_overflow++;
    check(d[2] && d[3], "F2M FIFO full and overflowed");
    for (int i = 0; i < 1024; i++) begin
      m.read(F2M_FIFO_ADDR, d);
      check(d[15:0] == dec_ref[i], $sformatf("FIFO word %0d: %h vs %h", i, d[15:0], dec_ref[i]));
    end
    m.read(M2F_FIFO_ADDR, d);
    check(d[ST_F2M_EMPTY], "F2M FIFO empty after reading");
    set_ctrl(0, 0, 1);                   // clear
    repeat (10) @(posedge aclk);
    set_ctrl(0, 0, 0);
    repeat (10) @(posedge aclk);
    m.read(F2M_REG_BASE + 0, d);
    if (!d[3] && !d[2]) n_clear++;
    check(!d[3], "overflow cleared");

    // ---------------- B. histogram with comparison ----------------
    m.write(M2F_REG_BASE + RATIO, 1);
    m.write(M2F_REG_BASE + NSAMP, 300);
    set_ctrl(1, 1, 0);
    wait_f2m_bits(0, 32'b10, 32'b10);    // histogrammer busy
    repeat (66000) @(posedge fclk);      // clear pass of 64K bins
    dec_ref.delete();
    feed(2 * 320, 1);
    up_read_histogram(1, total);
    check(total == 300, $sformatf("histogram total %0d", total));
    check(histo_done, "histo_done after the run");
    m.read(F2M_REG_BASE + 1, d);
    check(d == 300, "scount");
    m.read(F2M_REG_BASE + 2, d);
    check(d == 0, "no drop at half rate");

    // ---------------- C. full rate: drops ----------------
    set_ctrl(0, 0, 0);
    m.write(M2F_REG_BASE + RATIO, 0);
    m.write(M2F_REG_BASE + NSAMP, 200);
    set_ctrl(1, 1, 0);
    wait_f2m_bits(0, 32'b10, 32'b10);
    repeat (66000) @(posedge fclk);
    dec_ref.delete();
    feed(600, 0);
    up_read_histogram(0, total);
    check(total == 200, $sformatf("histogram total at full rate %0d", total));
    m.read(F2M_REG_BASE + 2, d);
    if (d > 0) n_drop++;
    check(d > 0, "samples dropped at full rate");

    // ---------------- D. uP -> FPGA block ----------------
    set_ctrl(0, 0, 0);
    up_claim();
    for (int i = 0; i < 50; i++) begin
      d = $urandom;
      m2f_ref.push_back(d);
      m.write(RAM_BASE + i, d);
    end
    m.write(M2F_REG_BASE + LEN_REG, 50);
    up_flag(READY_FOR_FPGA_BIT, 1);
    up_flag(UP_BUSY_BIT, 0);
    wait_f2m_bits(FLAG_REG, 32'd1 << FPGA_BUSY_BIT, 32'd1 << FPGA_BUSY_BIT);
    wait_f2m_bits(FLAG_REG, 32'd1 << FPGA_BUSY_BIT, 0);
    up_flag(READY_FOR_FPGA_BIT, 0);
    check(m2f_got == 50 && m2f_ref.size() == 0, $sformatf("m2f words %0d", m2f_got));
    check(m2f_last_ok == 50, "m2f_last only on the final word");
    if (m2f_got == 50) n_m2f_block++;

    // ---------------- E. deferred claim ----------------
    up_claim();
    m.write(M2F_REG_BASE + NSAMP, 10);
    set_ctrl(1, 1, 0);
    repeat (200) @(posedge aclk);
    m.read(F2M_REG_BASE + FLAG_REG, d);
    check(!d[FPGA_BUSY_BIT], "FPGA does not claim while the uP holds the RAM");
    m.read(F2M_REG_BASE + 0, d);
    if (!d[FPGA_BUSY_BIT] && d[1]) n_deferred++;
    up_flag(UP_BUSY_BIT, 0);
    wait_f2m_bits(FLAG_REG, 32'd1 << FPGA_BUSY_BIT, 32'd1 << FPGA_BUSY_BIT);
    repeat (66000) @(posedge fclk);
    feed(100, 0);
    up_read_histogram(0, total);
    check(total == 10, "short histogram after the deferred claim");

    check(m.resp_errors == 0, "OKAY responses");
    check(n_overflow > 0, "mechanism: FIFO overflow");
    check(n_clear > 0,    "mechanism: FIFO clear");
    check(n_drop > 0,     "mechanism: histogrammer drop");
    check(n_f2m_block > 0, "mechanism: FPGA -> uP block");
    check(n_m2f_block > 0, "mechanism: uP -> FPGA block");
    check(n_deferred > 0, "mechanism: deferred claim");
    $display("mechanisms: overflow=%0d clear=%0d drop=%0d f2m_blocks=%0d m2f_blocks=%0d deferred=%0d",
             n_overflow, n_clear, n_drop, n_f2m_block, n_m2f_block, n_deferred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
