// cb_axil_slave: AXI4-Lite slave front end of the ComBlock (uP side).
//
// It turns each AXI4-Lite transaction into one word access on a simple internal
// bus. The ComBlock map is word addressed, so bus_addr is the AXI byte address
// shifted right by two. A write is accepted when address and data are both
// valid (AWREADY and WREADY rise together for one cycle); it produces a
// one-cycle bus_we strobe and then holds BVALID until BREADY. A read produces a
// one-cycle bus_re strobe; the addressed resource returns bus_rdata on the next
// cycle (the TDPRAM and the FIFOs have registered outputs), which is then held
// on RDATA with RVALID until RREADY. Writes have priority when both arrive in
// the same cycle. One transaction is in flight at a time.
//
// Timing: write = 1 cycle accept + response; read = accept, 1 cycle of RAM
// latency, response. All responses are OKAY: unmapped words read as zero and
// ignore writes. AXI4-Lite is the bus named in the document for the uP side;
// the single-outstanding handshake and the one-cycle latency are this design's.
module cb_axil_slave #(
  parameter int unsigned AXI_AW = 19,  // byte address bits (covers word 0x10021)
  parameter int unsigned AXI_DW = 32
) (
  input  logic                  aclk,
  input  logic                  aresetn,
  // AXI4-Lite write address / data / response
  input  logic [AXI_AW-1:0]     s_axi_awaddr,
  input  logic [2:0]            s_axi_awprot,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [AXI_DW-1:0]     s_axi_wdata,
  input  logic [AXI_DW/8-1:0]   s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  // AXI4-Lite read address / data
  input  logic [AXI_AW-1:0]     s_axi_araddr,
  input  logic [2:0]            s_axi_arprot,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [AXI_DW-1:0]     s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  // internal word bus
  output logic [AXI_AW-3:0]     bus_addr,
  output logic                  bus_we,
  output logic [AXI_DW-1:0]     bus_wdata,
  output logic [AXI_DW/8-1:0]   bus_wstrb,
  output logic                  bus_re,
  input  logic [AXI_DW-1:0]     bus_rdata
);
  import comblock_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_WRESP, S_RWAIT, S_RRESP} state_e;
  state_e state;

  logic take_wr, take_rd;
  assign take_wr = (state == S_IDLE) && s_axi_awvalid && s_axi_wvalid;
  assign take_rd = (state == S_IDLE) && !take_wr && s_axi_arvalid;

  assign s_axi_awready = take_wr;
  assign s_axi_wready  = take_wr;
  assign s_axi_arready = take_rd;
  assign s_axi_bresp   = RESP_OKAY;
  assign s_axi_rresp   = RESP_OKAY;
  assign s_axi_bvalid  = (state == S_WRESP);
  assign s_axi_rvalid  = (state == S_RRESP);

  // The bus strobes are combinational with the AXI accept.
  assign bus_we    = take_wr;
  assign bus_re    = take_rd;
  assign bus_addr  = take_wr ? s_axi_awaddr[AXI_AW-1:2] : s_axi_araddr[AXI_AW-1:2];
  assign bus_wdata = s_axi_wdata;
  assign bus_wstrb = s_axi_wstrb;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state       <= S_IDLE;
      s_axi_rdata <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (take_wr) state <= S_WRESP;
                 else if (take_rd) state <= S_RWAIT;
        S_WRESP: if (s_axi_bready) state <= S_IDLE;
        S_RWAIT: begin
          s_axi_rdata <= bus_rdata;
          state       <= S_RRESP;
        end
        S_RRESP: if (s_axi_rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The protection bits and the byte lane of the address carry no meaning for
  // this word-only slave.
  logic unused_bits;
  assign unused_bits = ^{s_axi_awprot, s_axi_arprot, s_axi_awaddr[1:0], s_axi_araddr[1:0]};

  // AXI rule: a response, once valid, stays valid until accepted.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
