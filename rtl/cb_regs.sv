// cb_regs: the two register banks of the ComBlock.
//
// M2F registers (uP to FPGA): written by the uP over the word bus, with byte
// strobes, and driven continuously onto m2f_o for the FPGA logic. The uP can
// read them back.
// F2M registers (FPGA to uP): the FPGA drives f2m_i continuously; the bank
// samples those inputs on every bus clock and the uP reads the sampled copy.
// Writes from the uP to F2M registers are ignored.
// Bus timing: bus_we/bus_re are one-cycle strobes qualified by sel (the word
// address lies in 0x00..0x1F); bus_rdata is valid the cycle after bus_re.
// Address bit 4 selects the bank, bits 3:0 the register; slots above N_M2F or
// N_F2M read as zero.
// CDC: the banks live in the bus clock domain. A multi-bit register seen from
// the other domain may be caught mid-change; this is why the logical level
// carries single-bit flags (synchronized at the receiver) and only reads a
// length word while the flags say it is stable.
// The map (16 slots each, at 0x00 and 0x10) is the document's; the sampling
// of F2M inputs and the read-back of M2F registers are this design's.
module cb_regs #(
  parameter int unsigned N_M2F = 16,
  parameter int unsigned N_F2M = 16,
  parameter int unsigned DW    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  logic [4:0]        bus_addr,
  input  logic              bus_we,
  input  logic [DW-1:0]     bus_wdata,
  input  logic [DW/8-1:0]   bus_wstrb,
  input  logic              bus_re,
  output logic [DW-1:0]     bus_rdata,
  output logic [DW-1:0]     m2f_o [N_M2F],
  input  logic [DW-1:0]     f2m_i [N_F2M]
);
  logic [DW-1:0] f2m_q [N_F2M];
  logic [3:0]    idx;
  logic          bank_f2m;

  assign idx      = bus_addr[3:0];
  assign bank_f2m = bus_addr[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_M2F); i++) m2f_o[i] <= '0;
      for (int i = 0; i < int'(N_F2M); i++) f2m_q[i] <= '0;
      bus_rdata <= '0;
    end else begin
      for (int i = 0; i < int'(N_F2M); i++) f2m_q[i] <= f2m_i[i];
      if (sel && bus_we && !bank_f2m && 32'(idx) < N_M2F) begin
        for (int b = 0; b < int'(DW/8); b++)
          if (bus_wstrb[b]) m2f_o[idx][b*8 +: 8] <= bus_wdata[b*8 +: 8];
      end
      if (sel && bus_re) begin
        if (!bank_f2m) bus_rdata <= (32'(idx) < N_M2F) ? m2f_o[idx] : '0;
        else           bus_rdata <= (32'(idx) < N_F2M) ? f2m_q[idx] : '0;
      end
    end
  end
endmodule
