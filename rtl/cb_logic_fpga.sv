// cb_logic_fpga: FPGA half of the logical level of the ComBlock, a flags-based
// protocol for handing blocks of data through the shared TDPRAM safely.
//
// Each side owns one flag register: the FPGA drives F2M register FLAG_REG
// (bit0 FPGA-TDPRAM-busy, bit1 data-ready-for-uP) and F2M register LEN_REG
// (word count), the uP drives M2F register FLAG_REG (bit0 uP-TDPRAM-busy,
// bit1 data-ready-for-FPGA) and M2F register LEN_REG. The uP flags are
// synchronized into clk here.
//
// FPGA to uP (one block): the producer client asks with prod_req. The agent
// raises busy, and once it owns the RAM asserts prod_grant; the client then
// drives the RAM through prod_we/prod_addr/prod_wdata. On prod_done (with
// prod_len) the agent raises data-ready-for-uP, then drops busy. It waits
// for the uP to raise and then drop its busy flag (the uP has read the
// block), clears data-ready-for-uP and pulses prod_acked.
// uP to FPGA: when data-ready-for-FPGA is seen, the agent raises busy, reads
// LEN_REG words from RAM word 0 upwards and presents them on a valid/ready
// stream (cons_last marks the final word), drops busy and waits for the uP to
// clear data-ready-for-FPGA.
// Sequencing of the flags follows the document's two timing diagrams.
//
// Claiming the RAM is this design's rule, as the document does not say how a
// collision is resolved: the FPGA raises busy only while the uP busy flag is
// low, then waits GUARD cycles; if the uP busy flag has meanwhile risen the
// FPGA drops its flag, waits GUARD cycles and retries (the uP wins). The uP
// software, after raising its flag, waits until the FPGA busy flag reads low
// before touching the RAM. Placing the flags and the length in the last two
// registers, the word count as a register and the stream interface are also
// this design's choices.
//
// Timing: RAM port B reads are registered; the consumer needs two cycles per
// word plus the stream's back-pressure.
module cb_logic_fpga
  import comblock_pkg::*;
#(
  parameter int unsigned RAM_AW = 16,
  parameter int unsigned RAM_DW = 32,
  parameter int unsigned GUARD  = 4
) (
  input  logic              clk,
  input  logic              rst,
  // flag and length registers
  input  logic [31:0]       up_flags_i,
  input  logic [31:0]       up_len_i,
  output logic [31:0]       fpga_flags_o,
  output logic [31:0]       fpga_len_o,
  // producer client (FPGA -> uP)
  input  logic              prod_req_i,
  output logic              prod_grant_o,
  input  logic              prod_we_i,
  input  logic [RAM_AW-1:0] prod_addr_i,
  input  logic [RAM_DW-1:0] prod_wdata_i,
  input  logic              prod_done_i,
  input  logic [31:0]       prod_len_i,
  output logic              prod_acked_o,
  // consumer stream (uP -> FPGA)
  output logic              cons_valid_o,
  output logic [RAM_DW-1:0] cons_data_o,
  output logic              cons_last_o,
  input  logic              cons_ready_i,
  // TDPRAM port B
  output logic              ram_we_o,
  output logic [RAM_AW-1:0] ram_addr_o,
  output logic [RAM_DW-1:0] ram_wdata_o,
  input  logic [RAM_DW-1:0] ram_rdata_i
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLAIM_P, S_CLAIM_C, S_BACKOFF,
    S_PRODUCE, S_P_RELEASE, S_P_WAIT_BUSY, S_P_WAIT_DONE,
    S_C_READ, S_C_DATA, S_C_OUT, S_C_WAIT_CLR
  } state_e;

  state_e state;
  logic [1:0]  up_s;
  logic        up_busy, ready_for_fpga;
  logic        fpga_busy, ready_for_up;
  logic [$clog2(GUARD+1)-1:0] guard_cnt;
  logic [31:0] rd_idx, rd_len;

  cb_sync #(.W(2)) u_sync (.clk, .rst,
    .d({up_flags_i[READY_FOR_FPGA_BIT], up_flags_i[UP_BUSY_BIT]}), .q(up_s));
  assign up_busy        = up_s[0];
  assign ready_for_fpga = up_s[1];

  always_comb begin
    fpga_flags_o = '0;
    fpga_flags_o[FPGA_BUSY_BIT]    = fpga_busy;
    fpga_flags_o[READY_FOR_UP_BIT] = ready_for_up;
  end

  assign prod_grant_o = (state == S_PRODUCE);
  assign ram_we_o     = (state == S_PRODUCE) && prod_we_i;
  assign ram_addr_o   = (state == S_PRODUCE) ? prod_addr_i : rd_idx[RAM_AW-1:0];
  assign ram_wdata_o  = prod_wdata_i;
  assign cons_valid_o = (state == S_C_OUT);
  assign cons_last_o  = (state == S_C_OUT) && (rd_idx + 1 == rd_len);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= S_IDLE;
      fpga_busy    <= 1'b0;
      ready_for_up <= 1'b0;
      fpga_len_o   <= '0;
      guard_cnt    <= '0;
      rd_idx       <= '0;
      rd_len       <= '0;
      cons_data_o  <= '0;
      prod_acked_o <= 1'b0;
    end else begin
      prod_acked_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          guard_cnt <= '0;
          if (!up_busy && prod_req_i && !ready_for_up) begin
            fpga_busy <= 1'b1;
            state     <= S_CLAIM_P;
          end else if (!up_busy && ready_for_fpga) begin
            fpga_busy <= 1'b1;
            state     <= S_CLAIM_C;
          end
        end
        S_CLAIM_P, S_CLAIM_C: begin
          if (up_busy) begin
            fpga_busy <= 1'b0;       // the uP claimed too: yield
            guard_cnt <= '0;
            state     <= S_BACKOFF;
          end else if (32'(guard_cnt) == GUARD - 1) begin
            if (state == S_CLAIM_P) begin
              state <= S_PRODUCE;
            end else begin
              rd_len <= up_len_i;
              rd_idx <= '0;
              state  <= (up_len_i == 0) ? S_C_WAIT_CLR : S_C_READ;
              if (up_len_i == 0) fpga_busy <= 1'b0;
            end
          end else begin
            guard_cnt <= guard_cnt + 1'b1;
          end
        end
        S_BACKOFF: begin
          if (32'(guard_cnt) == GUARD - 1) state <= S_IDLE;
          else guard_cnt <= guard_cnt + 1'b1;
        end
        S_PRODUCE: begin
          if (prod_done_i) begin
            fpga_len_o   <= prod_len_i;
            ready_for_up <= 1'b1;
            state        <= S_P_RELEASE;
          end
        end
        S_P_RELEASE: begin
          fpga_busy <= 1'b0;
          state     <= S_P_WAIT_BUSY;
        end
        S_P_WAIT_BUSY: if (up_busy) state <= S_P_WAIT_DONE;
        S_P_WAIT_DONE: begin
          if (!up_busy) begin
            ready_for_up <= 1'b0;
            prod_acked_o <= 1'b1;
            state        <= S_IDLE;
          end
        end
        S_C_READ: state <= S_C_DATA;       // address on the RAM this cycle
        S_C_DATA: begin
          cons_data_o <= ram_rdata_i;
          state       <= S_C_OUT;
        end
        S_C_OUT: begin
          if (cons_ready_i) begin
            if (rd_idx + 1 == rd_len) begin
              fpga_busy <= 1'b0;
              state     <= S_C_WAIT_CLR;
            end else begin
              rd_idx <= rd_idx + 1;
              state  <= S_C_READ;
            end
          end
        end
        S_C_WAIT_CLR: if (!ready_for_fpga) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The RAM is touched only while the FPGA busy flag is up.
  a_ram_only_when_busy: assert property (@(posedge clk) disable iff (rst)
    ram_we_o |-> fpga_busy);
  // data-ready-for-uP never rises while the FPGA is not holding the RAM.
  a_ready_after_busy: assert property (@(posedge clk) disable iff (rst)
    $rose(ready_for_up) |-> $past(fpga_busy));
endmodule
