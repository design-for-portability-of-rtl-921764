// cb_histogrammer: builds a histogram of incoming samples directly in the
// ComBlock TDPRAM, so that the uP can read it as a block of 2**RAM_AW bins.
//
// A rising edge on start begins a run: the block asks the logical-level agent
// for the RAM (prod_req), and once granted it clears all 2**RAM_AW bins, then
// counts nsamples samples. The bin of a sample is its top RAM_AW bits. Each
// sample costs two cycles on the single RAM port: read the bin, then write the
// bin plus one. A sample that arrives during the write cycle cannot be taken
// and is counted in dropped. After nsamples samples the block reports
// prod_done with prod_len = 2**RAM_AW, holds done high and waits for the agent
// to say the uP has read the histogram (prod_acked) before a new run can
// start. scount counts samples binned in the current run.
// Timing: clear takes 2**RAM_AW cycles; then up to one sample per two cycles.
// The document names the block, places it after the decimator, lets it write
// the TDPRAM and signals histo_done; the clear pass, the bin mapping, the
// two-cycle update and the dropped counter are this design's choices.
module cb_histogrammer #(
  parameter int unsigned SW     = 16,
  parameter int unsigned RAM_AW = 16,
  parameter int unsigned RAM_DW = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [31:0]       nsamples,
  input  logic              in_valid,
  input  logic [SW-1:0]     in_data,
  output logic              busy,
  output logic              done,
  output logic [31:0]       scount,
  output logic [31:0]       dropped,
  // to the logical-level agent
  output logic              prod_req,
  input  logic              prod_grant,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [RAM_DW-1:0] ram_wdata,
  input  logic [RAM_DW-1:0] ram_rdata,
  output logic              prod_done,
  output logic [31:0]       prod_len,
  input  logic              prod_acked
);
  typedef enum logic [2:0] {H_IDLE, H_REQ, H_CLEAR, H_ACC, H_WRITE, H_DONE, H_WAIT} hstate_e;

  hstate_e           state;
  logic              start_q;
  logic [RAM_AW-1:0] clr_addr, bin_q;
  logic [SW-1:0]     unused_low;

  assign unused_low = in_data;  // only the top RAM_AW bits select a bin

  assign prod_req  = (state == H_REQ);
  assign prod_done = (state == H_DONE);
  assign prod_len  = 32'(64'd1 << RAM_AW);
  assign busy      = (state != H_IDLE) && (state != H_WAIT) && !done;

  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = in_data[SW-1 -: RAM_AW];
    ram_wdata = '0;
    unique case (state)
      H_CLEAR: begin
        ram_we   = 1'b1;
        ram_addr = clr_addr;
      end
      H_WRITE: begin
        ram_we    = 1'b1;
        ram_addr  = bin_q;
        ram_wdata = ram_rdata + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= H_IDLE;
      start_q  <= 1'b0;
      clr_addr <= '0;
      bin_q    <= '0;
      scount   <= '0;
      dropped  <= '0;
      done     <= 1'b0;
    end else begin
      start_q <= start;
      unique case (state)
        H_IDLE: if (start && !start_q) begin
          scount  <= '0;
          dropped <= '0;
          done    <= 1'b0;
          state   <= H_REQ;
        end
        H_REQ: if (prod_grant) begin
          clr_addr <= '0;
          state    <= H_CLEAR;
        end
        H_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= (nsamples == 0) ? H_DONE : H_ACC;
        end
        H_ACC: if (in_valid) begin
          bin_q <= in_data[SW-1 -: RAM_AW];   // read of this bin issued now
          state <= H_WRITE;
        end
        H_WRITE: begin
          if (in_valid) dropped <= dropped + 1'b1;
          scount <= scount + 1'b1;
          state  <= (scount + 1 == nsamples) ? H_DONE : H_ACC;
        end
        H_DONE: begin
          done  <= 1'b1;
          state <= H_WAIT;
        end
        H_WAIT: if (prod_acked) state <= H_IDLE;
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
