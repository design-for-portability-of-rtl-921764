// cb_async_fifo: dual-clock FIFO used for the M2F and F2M FIFOs of the ComBlock.
//
// Write side and read side run on independent clocks. The classic scheme is
// used: binary pointers one bit wider than the address, converted to gray code,
// and each gray pointer crossed into the other domain through a two-flop
// synchronizer. Each side therefore sees the other side's progress two or
// three of its own cycles late, so "full" and "empty" are pessimistic, never
// wrong.
//
// Flags, as listed on the block's ports in the document (full, almost full,
// overflow, empty, almost empty, underflow):
//   full      = DEPTH words stored (write side view)
//   afull     = at least DEPTH - AF_OFFSET words stored
//   overflow  = sticky: a write was attempted while full (the word is dropped)
//   empty     = no word stored (read side view)
//   aempty    = at most AE_OFFSET words stored
//   underflow = sticky: a read was attempted while empty (output unchanged)
// Reading: rd_en in one cycle pops the oldest word, which appears on rd_data
// after the clock edge (registered output, one cycle of latency).
// clear (any domain, level) empties the FIFO and clears the sticky flags: it
// is OR-ed with rst and acts as an asynchronous reset whose release is
// synchronized into each domain. Neither side may access the FIFO while clear
// is active.
// Depth, width and offsets default to the document's configuration (16-bit
// words, 1024 deep, offsets 1). The sticky flags and the clear mechanism are
// this design's own reading of the port names.
module cb_async_fifo #(
  parameter int unsigned DW        = 16,
  parameter int unsigned DEPTH     = 1024,  // power of two
  parameter int unsigned AE_OFFSET = 1,
  parameter int unsigned AF_OFFSET = 1
) (
  input  logic          rst,     // asynchronous, active high
  input  logic          clear,   // asynchronous, active high, empties the FIFO
  // write side
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  output logic          afull,
  output logic          overflow,
  // read side
  input  logic          rd_clk,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic          aempty,
  output logic          underflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r;       // gray pointers seen across the boundary
  logic [AW:0] rbin_w, wbin_r;
  logic [AW:0] wcount, rcount;
  logic        wrst, rrst;              // per-domain reset, released synchronously
  logic        wrst_n_s, rrst_n_s;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Reset and clear: asserted at once, released through two flops per domain.
  cb_sync u_wrst (.clk(wr_clk), .rst(rst | clear), .d(1'b1), .q(wrst_n_s));
  cb_sync u_rrst (.clk(rd_clk), .rst(rst | clear), .d(1'b1), .q(rrst_n_s));
  assign wrst = !wrst_n_s;
  assign rrst = !rrst_n_s;

  // ---------------- write side ----------------
  cb_sync #(.W(AW+1)) u_r2w (.clk(wr_clk), .rst(wrst), .d(rgray), .q(rgray_w));
  assign rbin_w = gray2bin(rgray_w);
  assign wcount = wbin - rbin_w;
  assign full   = (wcount == (AW+1)'(DEPTH));
  assign afull  = (wcount >= (AW+1)'(DEPTH - AF_OFFSET));

  always_ff @(posedge wr_clk or posedge wrst) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      if (full) begin
        overflow <= 1'b1;
      end else begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  cb_sync #(.W(AW+1)) u_w2r (.clk(rd_clk), .rst(rrst), .d(wgray), .q(wgray_r));
  assign wbin_r = gray2bin(wgray_r);
  assign rcount = wbin_r - rbin;
  assign empty  = (rcount == '0);
  assign aempty = (rcount <= (AW+1)'(AE_OFFSET));

  always_ff @(posedge rd_clk or posedge rrst) begin
    if (rrst) begin
      rbin      <= '0;
      rgray     <= '0;
      underflow <= 1'b0;
    end else if (rd_en) begin
      if (empty) begin
        underflow <= 1'b1;
      end else begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_en && !empty) rd_data <= mem[rbin[AW-1:0]];
  end

  a_no_count_overrun_w: assert property (@(posedge wr_clk) disable iff (wrst)
    wcount <= (AW+1)'(DEPTH));
  a_no_count_overrun_r: assert property (@(posedge rd_clk) disable iff (rrst)
    rcount <= (AW+1)'(DEPTH));
endmodule
