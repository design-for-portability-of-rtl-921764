// tb_cb_async_fifo: self-checking test of the dual-clock FIFO.
// Write clock 10 ns, read clock 7 ns. Phases:
//  1. random writes and reads: every word read must equal the reference queue
//  2. fill with the reader stopped: full and almost full at the exact counts,
//     a write while full sets overflow and is dropped
//  3. drain: almost empty and empty at the exact counts, a read while empty
//     sets underflow; the dropped word never appears
//  4. clear: FIFO empties, sticky flags drop
module tb_cb_async_fifo;
  localparam int DW = 16, DEPTH = 16, AEO = 1, AFO = 1;
  logic wr_clk = 0, rd_clk = 0, rst = 1, clear = 0;
  always #5   wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;

  logic          wr_en = 0, rd_en = 0;
  logic [DW-1:0] wr_data = 0, rd_data;
  logic          full, afull, overflow, empty, aempty, underflow;

  cb_async_fifo #(.DW(DW), .DEPTH(DEPTH), .AE_OFFSET(AEO), .AF_OFFSET(AFO)) dut (
    .rst, .clear, .wr_clk, .wr_en, .wr_data, .full, .afull, .overflow,
    .rd_clk, .rd_en, .rd_data, .empty, .aempty, .underflow);

  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  int  wr_pct = 0, rd_pct = 0;      // chance of a write / read per cycle
  bit  force_wr = 0, force_rd = 0;  // access even when full / empty
  int  n_written = 0, n_read = 0;
  int  pop_budget = 0;              // exact number of reads to issue

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer: decide at the falling edge, account at the next falling edge
  bit prev_push;
  always @(negedge wr_clk) begin
    if (prev_push) begin q.push_back(wr_data); n_written++; end
    wr_en = (force_wr || !full) && ($urandom_range(99) < wr_pct);
    wr_data = DW'($urandom);
    prev_push = wr_en && !full;
  end

  // reader: pop the expectation when the read is issued, compare after the edge
  bit prev_pop;
  logic [DW-1:0] expect_d;
  always @(negedge rd_clk) begin
    if (prev_pop) begin
      check(rd_data == expect_d, $sformatf("data %h vs %h", rd_data, expect_d));
      n_read++;
    end
    rd_en = (force_rd || !empty) && ($urandom_range(99) < rd_pct);
    if (pop_budget > 0 && !empty) begin rd_en = 1; pop_budget--; end
    prev_pop = rd_en && !empty;
    if (prev_pop) begin
      if (q.size() == 0) begin check(0, "read of a word never written"); prev_pop = 0; end
      else expect_d = q.pop_front();
    end
  end

  initial begin
    prev_push = 0; prev_pop = 0;
    repeat (3) @(posedge wr_clk);
    rst = 0;
    repeat (5) @(posedge wr_clk);
    check(empty && aempty && !full && !afull && !overflow && !underflow, "flags after reset");
    // 1. random traffic
    wr_pct = 60; rd_pct = 60;
    repeat (2000) @(posedge wr_clk);
    wr_pct = 90; rd_pct = 30;
    repeat (500) @(posedge wr_clk);
    wr_pct = 20; rd_pct = 90;
    repeat (500) @(posedge wr_clk);
    check(n_read > 1000, $sformatf("enough traffic (%0d reads)", n_read));
    check(!overflow && !underflow, "no sticky flag in normal traffic");
    // 2. fill with the reader stopped
    rd_pct = 0; wr_pct = 0;
    repeat (10) @(posedge rd_clk);
    wr_pct = 100;
    repeat (DEPTH + 10) @(posedge wr_clk);
    wr_pct = 0;
    repeat (4) @(posedge wr_clk);
    check(q.size() == DEPTH, $sformatf("filled to depth (%0d)", q.size()));
    check(full && afull && !overflow, "full flags");
    force_wr = 1; wr_pct = 100;
    @(posedge wr_clk); @(negedge wr_clk);
    force_wr = 0; wr_pct = 0;
    repeat (2) @(posedge wr_clk);
    check(overflow, "overflow after a write while full");
    check(q.size() == DEPTH, "overflow word dropped");
    // 3. drain one word at a time and watch the read-side flags
    repeat (4) @(posedge rd_clk);
    check(!empty && !aempty, "not almost empty when full");
    while (q.size() > 0) begin
      pop_budget = 1;
      while (pop_budget > 0) @(negedge rd_clk);
      repeat (3) @(negedge rd_clk);
      check(aempty == (q.size() <= AEO), $sformatf("aempty at %0d words", q.size()));
      check(empty == (q.size() == 0), $sformatf("empty at %0d words", q.size()));
    end
    repeat (6) @(posedge wr_clk);
    check(!full && !afull, "write side sees the drain");
    force_rd = 1; rd_pct = 100;
    @(negedge rd_clk); @(negedge rd_clk);
    force_rd = 0; rd_pct = 0;
    repeat (2) @(posedge rd_clk);
    check(underflow, "underflow after a read while empty");
    // 4. clear
    wr_pct = 100;
    repeat (5) @(posedge wr_clk);
    wr_pct = 0;
    repeat (5) @(posedge rd_clk);
    check(!empty, "data before clear");
    @(negedge wr_clk); clear = 1;
    repeat (2) @(negedge wr_clk); clear = 0;
    q.delete();
    repeat (6) @(posedge wr_clk);
    check(empty && !full && !overflow && !underflow, "flags after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
