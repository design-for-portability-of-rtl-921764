// cb_decimator: sample-rate reducer of the example acquisition chain
// (ADC -> decimator -> histogrammer / F2M FIFO).
//
// A boxcar decimator: it sums 2**log2_ratio consecutive input samples and
// emits one output per block, the mean (sum shifted right by log2_ratio) on
// out_data and the full sum on out_sum. With log2_ratio = 0 every sample
// passes through. Clearing en discards a partial block.
// Timing: out_valid is a one-cycle pulse in the cycle after the last sample of
// a block was accepted; the input may be valid on every cycle.
// The document names the block and shows where it sits; the boxcar average
// and the power-of-two ratio are this design's choices. log2_ratio above
// MAX_LOG2 is clamped.
module cb_decimator #(
  parameter int unsigned SW       = 16,  // sample width
  parameter int unsigned MAX_LOG2 = 15
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [4:0]    log2_ratio,
  input  logic          in_valid,
  input  logic [SW-1:0] in_data,
  output logic          out_valid,
  output logic [SW-1:0] out_data,
  output logic [31:0]   out_sum
);
  localparam int unsigned ACC_W = SW + MAX_LOG2;

  logic [4:0]       k;
  logic [ACC_W-1:0] acc, acc_next;
  logic [15:0]      cnt;
  logic             last;

  assign k        = (32'(log2_ratio) > MAX_LOG2) ? 5'(MAX_LOG2) : log2_ratio;
  assign acc_next = acc + ACC_W'(in_data);
  assign last     = (32'(cnt) == (32'd1 << k) - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sum   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!en) begin
        acc <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        if (last) begin
          out_valid <= 1'b1;
          out_data  <= SW'(acc_next >> k);
          out_sum   <= 32'(acc_next);
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
