// pp_bcid: bunch crossing identification of the patch-panel chip.
//
// The delay-adjusted hit signals are sampled with the bunch-crossing clock. A hit is
// assigned to the first crossing in which it is seen: the output gives a pulse exactly one
// crossing long at the crossing where an enabled channel changes from no-hit to hit, however
// long the discriminator pulse lasts. Masked channels give nothing. One clock of latency.
//
// Synchronising each hit to one crossing follows the design description; the leading-edge
// rule and the channel mask are own choices (the sub-ns delay adjustment in front of this
// block is analog and not part of this module).
module pp_bcid #(
  parameter int unsigned NCH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] hit_in,
  input  logic [NCH-1:0] mask,      // 1 = channel enabled
  output logic [NCH-1:0] hit_out
);
  logic [NCH-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= '0;
      hit_out <= '0;
    end else begin
      prev    <= hit_in;
      hit_out <= hit_in & ~prev & mask;
    end
  end
endmodule
