// tb_cb_decimator: self-checking test of the boxcar decimator.
// For several ratios (1, 2, 8, 16, and a value above the clamp) it feeds
// random samples with random gaps and compares each output (mean and sum)
// against a reference computed here, and checks that one output appears per
// 2**k accepted samples, one cycle after the last sample of a block. It also
// checks that clearing en discards a partial block.
module tb_cb_decimator;
  localparam int SW = 16, MAXL = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          en = 0, in_valid = 0, out_valid;
  logic [4:0]    log2_ratio = 0;
  logic [SW-1:0] in_data = 0, out_data;
  logic [31:0]   out_sum;

  cb_decimator #(.SW(SW), .MAX_LOG2(MAXL)) dut (.clk, .rst, .en, .log2_ratio, .in_valid, .in_data,
                                               .out_valid, .out_data, .out_sum);

  int checks = 0, failures = 0;
  int n_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_ratio(input int l2, input int blocks, input int gap_pct);
    int k, n;
    longint sum;
    k = (l2 > MAXL) ? MAXL : l2;
    n = 1 << k;
    @(negedge clk); log2_ratio = 5'(l2); en = 1;
    for (int b = 0; b < blocks; b++) begin
      sum = 0;
      for (int i = 0; i < n; i++) begin
        while ($urandom_range(99) < gap_pct) begin
          in_valid = 0; @(negedge clk);
          check(!out_valid, "no output during gaps");
        end
        in_valid = 1; in_data = SW'($urandom);
        sum += in_data;
        @(negedge clk);
        if (i != n - 1) check(!out_valid, "no output inside a block");
      end
      in_valid = 0;
      check(out_valid, $sformatf("output after block (ratio 2^%0d)", k));
      check(out_data == SW'(sum >> k), $sformatf("mean %h vs %h", out_data, SW'(sum >> k)));
      check(out_sum == 32'(sum), "sum");
      n_out++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run_ratio(0, 50, 0);
    run_ratio(1, 50, 30);
    run_ratio(3, 30, 0);
    run_ratio(4, 20, 20);
    run_ratio(9, 5, 10);   // clamped to MAX_LOG2
    // partial block discarded when en drops
    log2_ratio = 2;
    in_valid = 1; in_data = 16'hFFFF;
    repeat (2) @(negedge clk);
    in_valid = 0; en = 0;
    @(negedge clk);
    en = 1;
    run_ratio(2, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
