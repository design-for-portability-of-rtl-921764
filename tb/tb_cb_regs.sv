// tb_cb_regs: self-checking test of the ComBlock register banks.
// Drives the word bus directly: writes M2F registers with random byte strobes
// and checks m2f_o and the read-back; drives random F2M inputs and checks the
// sampled read; checks that writes to F2M slots and to an unselected bus are
// ignored, and that read data arrives one cycle after the strobe.
module tb_cb_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel, bus_we, bus_re;
  logic [4:0]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [3:0]  bus_wstrb;
  logic [31:0] m2f_o [16];
  logic [31:0] f2m_i [16];

  cb_regs #(.N_M2F(16), .N_F2M(16)) dut (.clk, .rst_n, .sel, .bus_addr, .bus_we, .bus_wdata,
    .bus_wstrb, .bus_re, .bus_rdata, .m2f_o, .f2m_i);

  int checks = 0, failures = 0;
  logic [31:0] ref_m2f [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bwrite(input logic [4:0] a, input logic [31:0] d, input logic [3:0] s, input bit sl = 1);
    @(negedge clk);
    sel = sl; bus_addr = a; bus_wdata = d; bus_wstrb = s; bus_we = 1;
    @(negedge clk);
    bus_we = 0; sel = 0;
  endtask

  task automatic bread(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    sel = 1; bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0; sel = 0;
    d = bus_rdata;           // registered: valid one cycle after the strobe
  endtask

  initial begin
    logic [31:0] d, v;
    logic [3:0]  s;
    int i;
    sel = 0; bus_we = 0; bus_re = 0; bus_addr = 0; bus_wdata = 0; bus_wstrb = 0;
    for (int k = 0; k < 16; k++) begin f2m_i[k] = 0; ref_m2f[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) check(m2f_o[k] == 0, "reset value");
    for (int k = 0; k < 300; k++) begin
      i = $urandom_range(15);
      v = $urandom; s = 4'($urandom);
      bwrite(5'(i), v, s);
      for (int b = 0; b < 4; b++) if (s[b]) ref_m2f[i][b*8 +: 8] = v[b*8 +: 8];
      check(m2f_o[i] == ref_m2f[i], $sformatf("m2f_o[%0d] %h vs %h", i, m2f_o[i], ref_m2f[i]));
      bread(5'(i), d);
      check(d == ref_m2f[i], $sformatf("read-back m2f %0d", i));
    end
    for (int k = 0; k < 100; k++) begin
      i = $urandom_range(15);
      v = $urandom;
      f2m_i[i] = v;
      bread(5'(16 + i), d);
      check(d == v, $sformatf("f2m %0d: %h vs %h", i, d, v));
      bwrite(5'(16 + i), ~v, 4'hF);          // ignored
      bread(5'(16 + i), d);
      check(d == v, "f2m write ignored");
    end
    bwrite(5'd3, 32'hDEAD_BEEF, 4'hF, 1'b0); // not selected: ignored
    check(m2f_o[3] == ref_m2f[3], "unselected write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
