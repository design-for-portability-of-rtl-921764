// tb_cb_logic_fpga: self-checking test of the FPGA half of the logical-level
// transfer protocol.
// The agent (FPGA clock 10 ns) shares a TDPRAM with a uP model (13 ns clock)
// that follows the software half of the protocol through the flag and length
// words. Scenarios:
//  - FPGA -> uP blocks: a producer writes a pattern when granted; the uP model
//    waits for data-ready-for-uP with FPGA busy low, raises its busy flag,
//    reads and checks the block, drops busy; the agent must then clear
//    data-ready-for-uP and pulse prod_acked.
//  - uP -> FPGA blocks: the uP model claims the RAM, writes a block, sets the
//    length and data-ready-for-FPGA, drops busy; the agent must stream the
//    block out (random back-pressure) and drop busy, then the uP clears
//    ready.
//  - collision: the uP raises its busy flag just after the FPGA claimed; the
//    agent must yield and only get the grant after the uP has finished.
// A monitor checks the flag order of the document's timing diagrams and that
// the FPGA never writes the RAM while the uP holds it.
module tb_cb_logic_fpga;
  import comblock_pkg::*;
  localparam int AW = 8, DW = 32;
  logic clk = 0, up_clk = 0, rst = 1;
  always #5   clk = ~clk;
  always #6.5 up_clk = ~up_clk;

  logic [31:0] up_flags = 0, up_len = 0, fpga_flags, fpga_len;
  logic        prod_req = 0, prod_grant, prod_we = 0, prod_done = 0, prod_acked;
  logic [AW-1:0] prod_addr = 0;
  logic [DW-1:0] prod_wdata = 0;
  logic [31:0]   prod_len = 0;
  logic          cons_valid, cons_last, cons_ready = 0;
  logic [DW-1:0] cons_data;
  logic          ram_we;
  logic [AW-1:0] ram_addr;
  logic [DW-1:0] ram_wdata, ram_rdata;
  logic          en_a = 0, we_a = 0;
  logic [AW-1:0] addr_a = 0;
  logic [DW-1:0] wdata_a = 0, rdata_a;

  cb_logic_fpga #(.RAM_AW(AW), .RAM_DW(DW), .GUARD(4)) dut (
    .clk, .rst, .up_flags_i(up_flags), .up_len_i(up_len), .fpga_flags_o(fpga_flags),
    .fpga_len_o(fpga_len), .prod_req_i(prod_req), .prod_grant_o(prod_grant),
    .prod_we_i(prod_we), .prod_addr_i(prod_addr), .prod_wdata_i(prod_wdata),
    .prod_done_i(prod_done), .prod_len_i(prod_len), .prod_acked_o(prod_acked),
    .cons_valid_o(cons_valid), .cons_data_o(cons_data), .cons_last_o(cons_last),
    .cons_ready_i(cons_ready),
    .ram_we_o(ram_we), .ram_addr_o(ram_addr), .ram_wdata_o(ram_wdata), .ram_rdata_i(ram_rdata));

  cb_tdpram #(.DW(DW), .AW(AW)) u_ram (
    .clk_a(up_clk), .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
    .clk_b(clk), .en_b(1'b1), .we_b(ram_we), .addr_b(ram_addr), .wdata_b(ram_wdata), .rdata_b(ram_rdata));

  int checks = 0, failures = 0;
  int n_f2m = 0, n_m2f = 0, n_yield = 0, n_acked = 0;
  logic fpga_busy, ready_up;
  assign fpga_busy = fpga_flags[FPGA_BUSY_BIT];
  assign ready_up  = fpga_flags[READY_FOR_UP_BIT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- monitors ----------------
  logic busy_q = 0, ready_q = 0, up_took = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (ram_we) check(!up_flags[UP_BUSY_BIT], "FPGA wrote the RAM while the uP held it");
      if (ready_up && !ready_q) check(busy_q, "data-ready-for-uP rose while FPGA not busy");
      // fig. order: data-ready-for-uP falls only after the uP held and released the RAM
      if (ready_up && up_flags[UP_BUSY_BIT]) up_took <= 1;
      if (!ready_up && ready_q) begin
        check(up_took && !up_flags[UP_BUSY_BIT], "data-ready-for-uP cleared before the uP read the block");
        up_took <= 0;
      end
      if (!fpga_busy && busy_q && prod_req) n_yield++;   // dropped busy before the grant
      if (prod_acked) n_acked++;
      busy_q  <= fpga_busy;
      ready_q <= ready_up;
    end
  end

  // ---------------- uP model helpers (on up_clk) ----------------
  task automatic up_ram(input bit we, input logic [AW-1:0] a, input logic [DW-1:0] d,
                        output logic [DW-1:0] q);
    @(negedge up_clk); en_a = 1; we_a = we; addr_a = a; wdata_a = d;
    @(negedge up_clk); en_a = 0; we_a = 0; q = rdata_a;
  endtask

  task automatic up_claim();
    forever begin
      while (fpga_busy) @(negedge up_clk);
      @(negedge up_clk); up_flags[UP_BUSY_BIT] = 1;
      repeat (3) @(negedge up_clk);          // the FPGA either saw it or yields
      while (fpga_busy) @(negedge up_clk);
      break;
    end
  endtask

  task automatic up_read_block(input logic [DW-1:0] seed);
    logic [DW-1:0] q;
    int len;
    while (!(ready_up && !fpga_busy)) @(negedge up_clk);
    up_claim();
    len = fpga_len;
    for (int i = 0; i < len; i++) begin
      up_ram(0, AW'(i), '0, q);
      check(q == seed + DW'(i) * 7, $sformatf("uP read word %0d: %h", i, q));
    end
    @(negedge up_clk); up_flags[UP_BUSY_BIT] = 0;
    while (ready_up) @(negedge up_clk);
    n_f2m++;
  endtask

  task automatic up_write_block(input int len, input logic [DW-1:0] seed);
    logic [DW-1:0] q;
    up_claim();
    for (int i = 0; i < len; i++) up_ram(1, AW'(i), seed ^ DW'(i * 3), q);
    @(negedge up_clk); up_len = len;
    @(negedge up_clk); up_flags[READY_FOR_FPGA_BIT] = 1;
    @(negedge up_clk); up_flags[UP_BUSY_BIT] = 0;
    while (!fpga_busy) @(negedge up_clk);
    while (fpga_busy) @(negedge up_clk);
    @(negedge up_clk); up_flags[READY_FOR_FPGA_BIT] = 0;
    n_m2f++;
  endtask

  // ---------------- FPGA-side producer and consumer ----------------
  task automatic produce(input int len, input logic [DW-1:0] seed);
    @(negedge clk); prod_req = 1;
    while (!prod_grant) @(negedge clk);
    prod_req = 0;
    check(!up_flags[UP_BUSY_BIT], "grant while the uP holds the RAM");
    for (int i = 0; i < len; i++) begin
      prod_we = 1; prod_addr = AW'(i); prod_wdata = seed + DW'(i) * 7;
      @(negedge clk);
    end
    prod_we = 0; prod_done = 1; prod_len = len;
    @(negedge clk); prod_done = 0;
    while (!prod_acked) @(negedge clk);
  endtask

  // stream checker
  int cons_idx = 0, cons_len_exp = 0;
  logic [DW-1:0] cons_seed = 0;
  always @(posedge clk) begin
    if (cons_valid && cons_ready) begin
      check(cons_data == (cons_seed ^ DW'(cons_idx * 3)), $sformatf("stream word %0d: %h", cons_idx, cons_data));
      check(cons_last == (cons_idx == cons_len_exp - 1), "cons_last position");
      cons_idx <= cons_idx + 1;
    end
  end
  always @(negedge clk) cons_ready = ($urandom_range(3) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    // FPGA -> uP
    for (int b = 0; b < 4; b++) begin
      int len;
      logic [DW-1:0] seed;
      len = 1 + $urandom_range(60); seed = $urandom;
      fork
        produce(len, seed);
        up_read_block(seed);
      join
    end
    // uP -> FPGA
    for (int b = 0; b < 4; b++) begin
      int len;
      logic [DW-1:0] seed;
      len = 1 + $urandom_range(60); seed = $urandom;
      cons_seed = seed; cons_len_exp = len; cons_idx = 0;
      up_write_block(len, seed);
      check(cons_idx == len, $sformatf("streamed %0d of %0d words", cons_idx, len));
    end
    // collision: the FPGA claims, the uP claims right behind it
    begin
      int len = 20;
      logic [DW-1:0] seed = 32'hC0DE_0000;
      fork
        produce(len, seed);
        begin
          while (!fpga_busy) @(negedge up_clk);
          up_flags[UP_BUSY_BIT] = 1;      // raised without checking: the uP wins
          repeat (30) @(negedge up_clk);
          check(!prod_grant, "no grant while the uP holds the RAM");
          up_flags[UP_BUSY_BIT] = 0;
          up_read_block(seed);
        end
      join
    end
    repeat (3) @(negedge clk);
    check(n_yield >= 1, $sformatf("FPGA yielded %0d times", n_yield));
    check(n_f2m == 5 && n_m2f == 4, "all blocks transferred");
    check(n_acked == 5, $sformatf("one prod_acked per block (%0d)", n_acked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
