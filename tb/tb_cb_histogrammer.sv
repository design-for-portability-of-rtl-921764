// tb_cb_histogrammer: self-checking test of the histogrammer.
// The histogrammer drives port B of a TDPRAM; the testbench plays the
// logical-level agent (grant after a request, acknowledge after done) and
// reads the histogram through port A. The RAM is first filled with garbage so
// that the clear pass is tested. Run 1 feeds samples with gaps (no drops) and
// compares every bin with a reference histogram. Run 2 feeds samples on every
// cycle: every second sample must be dropped and counted. Also checked: the
// clear pass lasts 2**RAM_AW cycles, prod_done comes with the bin count, done
// stays up until the next start.
module tb_cb_histogrammer;
  localparam int SW = 8, AW = 5, NB = 2**AW;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          start = 0, in_valid = 0;
  logic [31:0]   nsamples = 0;
  logic [SW-1:0] in_data = 0;
  logic          busy, done, prod_req, prod_grant = 0, ram_we, prod_done, prod_acked = 0;
  logic [31:0]   scount, dropped, prod_len;
  logic [AW-1:0] ram_addr;
  logic [31:0]   ram_wdata, ram_rdata;
  // port A of the RAM, used by the testbench
  logic          en_a = 0, we_a = 0;
  logic [AW-1:0] addr_a = 0;
  logic [31:0]   wdata_a = 0, rdata_a;

  cb_histogrammer #(.SW(SW), .RAM_AW(AW), .RAM_DW(32)) dut (
    .clk, .rst, .start, .nsamples, .in_valid, .in_data, .busy, .done, .scount, .dropped,
    .prod_req, .prod_grant, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .prod_done, .prod_len, .prod_acked);

  cb_tdpram #(.DW(32), .AW(AW)) u_ram (
    .clk_a(clk), .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
    .clk_b(clk), .en_b(1'b1), .we_b(ram_we), .addr_b(ram_addr), .wdata_b(ram_wdata), .rdata_b(ram_rdata));

  int checks = 0, failures = 0;
  int ref_h [NB];
  int n_done_pulses = 0;

  always @(posedge clk) if (prod_done) begin
    n_done_pulses++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n, input bit back_to_back);
    int t0, fed, want_drop;
    for (int b = 0; b < NB; b++) ref_h[b] = 0;
    // garbage in the RAM
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); en_a = 1; we_a = 1; addr_a = AW'(b); wdata_a = $urandom;
    end
    @(negedge clk); en_a = 0; we_a = 0;
    nsamples = n;
    start = 1;
    @(negedge clk); start = 0;
    while (!prod_req) @(negedge clk);
    check(busy, "busy while requesting");
    repeat ($urandom_range(5)) @(negedge clk);
    prod_grant = 1;
    @(negedge clk);
    t0 = 0;
    while (ram_we) begin @(negedge clk); t0++; end
    check(t0 == NB, $sformatf("clear pass lasts %0d cycles", t0));
    fed = 0; want_drop = 0;
    while (scount < n || fed == 0) begin
      if (scount >= n) break;
      if (!back_to_back) begin
        in_valid = 1; in_data = SW'($urandom);
        ref_h[in_data[SW-1 -: AW]]++;
        @(negedge clk);
        in_valid = 0;
        repeat (1 + $urandom_range(2)) @(negedge clk);
      end else begin
        in_valid = 1; in_data = SW'($urandom);
        if (fed % 2 == 0) ref_h[in_data[SW-1 -: AW]]++;
        else want_drop++;
        fed++;
        @(negedge clk);
        in_valid = 0;
        if (fed % 2 == 0 && scount >= n) break;
        in_valid = 0;
      end
      if (!back_to_back) fed++;
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(scount == n, $sformatf("scount %0d vs %0d", scount, n));
    check(done, "done after the run");
    check(!busy, "not busy after done");
    check(prod_len == NB, "prod_len is the bin count");
    if (back_to_back) check(dropped == want_drop && dropped > 0, $sformatf("dropped %0d vs %0d", dropped, want_drop));
    else              check(dropped == 0, "no drop with gaps");
    prod_grant = 0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); en_a = 1; addr_a = AW'(b);
      @(negedge clk); en_a = 0;
      check(rdata_a == ref_h[b], $sformatf("bin %0d: %0d vs %0d", b, rdata_a, ref_h[b]));
    end
    prod_acked = 1;
    @(negedge clk); prod_acked = 0;
    repeat (2) @(negedge clk);
    check(done, "done holds until the next start");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(200, 0);
    run(150, 1);
    check(n_done_pulses == 2, "one prod_done per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
