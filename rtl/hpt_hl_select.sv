// hpt_hl_select: H/L select of the high-pT chip (output combinations HH, HL, LL).
//
// hi[0..1] are the two best candidates that passed the high-pT coincidence, lo[0..1] the two
// best of the remaining doublet candidates, which carry the low-pT displacement from the
// slave board. High candidates always take precedence: two highs give HH, one high is
// completed with the best low one (HL), no high gives the two best lows (LL). The `high` bit
// of each output candidate tells which kind it is. Combinational.
//
// The three combinations are printed in the block diagram and the precedence of the chip's
// own displacement follows the design description; the output ordering is an own choice.
module hpt_hl_select
  import tgc_pkg::*;
(
  input  hpt_cand_t hi  [2],
  input  hpt_cand_t lo  [2],
  output hpt_cand_t out [2]
);
  always_comb begin
    if (hi[1].valid) begin          // HH
      out[0] = hi[0];
      out[1] = hi[1];
    end else if (hi[0].valid) begin // HL
      out[0] = hi[0];
      out[1] = lo[0];
    end else begin                  // LL
      out[0] = lo[0];
      out[1] = lo[1];
    end
  end
endmodule
