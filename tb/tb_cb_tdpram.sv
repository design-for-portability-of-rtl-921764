// tb_cb_tdpram: self-checking test of the true dual port RAM.
// Port A on a 10 ns clock, port B on a 13 ns clock. First each port writes its
// own half of the address space and the other port reads it back (data written
// through one port is visible on the other). Then both ports do random reads
// and writes on disjoint halves against a reference array, checking the
// one-cycle read latency and the read-first value on a write.
module tb_cb_tdpram;
  localparam int DW = 32, AW = 8, N = 2**AW;
  logic clk_a = 0, clk_b = 0;
  always #5   clk_a = ~clk_a;
  always #6.5 clk_b = ~clk_b;

  logic en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [AW-1:0] addr_a = 0, addr_b = 0;
  logic [DW-1:0] wdata_a = 0, wdata_b = 0, rdata_a, rdata_b;

  cb_tdpram #(.DW(DW), .AW(AW)) dut (.clk_a, .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
                                     .clk_b, .en_b, .we_b, .addr_b, .wdata_b, .rdata_b);

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op_a(input bit we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    logic [DW-1:0] expect_d;
    @(negedge clk_a);
    en_a = 1; we_a = we; addr_a = a; wdata_a = d;
    expect_d = ref_mem[a];
    if (we) ref_mem[a] = d;
    @(negedge clk_a);
    en_a = 0; we_a = 0;
    check(rdata_a == expect_d, $sformatf("port A word %0d: %h vs %h", a, rdata_a, expect_d));
  endtask

  task automatic op_b(input bit we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    logic [DW-1:0] expect_d;
    @(negedge clk_b);
    en_b = 1; we_b = we; addr_b = a; wdata_b = d;
    expect_d = ref_mem[a];
    if (we) ref_mem[a] = d;
    @(negedge clk_b);
    en_b = 0; we_b = 0;
    check(rdata_b == expect_d, $sformatf("port B word %0d: %h vs %h", a, rdata_b, expect_d));
  endtask

  initial begin
    // initialise through both ports
    for (int i = 0; i < N; i++) begin
      ref_mem[i] = 'x;
    end
    fork
      for (int i = 0; i < N/2; i++) begin
        @(negedge clk_a); en_a = 1; we_a = 1; addr_a = AW'(i); wdata_a = DW'($urandom);
        ref_mem[i] = wdata_a;
      end
      for (int i = N/2; i < N; i++) begin
        @(negedge clk_b); en_b = 1; we_b = 1; addr_b = AW'(i); wdata_b = DW'($urandom);
        ref_mem[i] = wdata_b;
      end
    join
    @(negedge clk_a); en_a = 0; we_a = 0;
    @(negedge clk_b); en_b = 0; we_b = 0;
    // cross reads
    for (int i = 0; i < N/2; i++) op_b(0, AW'(i), '0);
    for (int i = N/2; i < N; i++) op_a(0, AW'(i), '0);
    // concurrent random traffic on disjoint halves, then swap halves
    for (int r = 0; r < 2; r++) begin
      fork
        for (int k = 0; k < 300; k++)
          op_a($urandom_range(1), AW'($urandom_range(N/2-1) + (r ? N/2 : 0)), DW'($urandom));
        for (int k = 0; k < 300; k++)
          op_b($urandom_range(1), AW'($urandom_range(N/2-1) + (r ? 0 : N/2)), DW'($urandom));
      join
    end
    // disabled port holds its output
    begin
      logic [DW-1:0] held;
      @(negedge clk_a); held = rdata_a; addr_a = addr_a + 1'b1;
      @(negedge clk_a);
      check(rdata_a == held, "output held while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
