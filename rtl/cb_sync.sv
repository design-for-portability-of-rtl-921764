// cb_sync: two-flop synchronizer for a single-bit level crossing into clk.
// The output follows the input two clock edges later. Used only for flags
// that change slowly compared with clk (protocol flags, resets, gray-coded
// pointer bits). Reset clears both stages.
module cb_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
