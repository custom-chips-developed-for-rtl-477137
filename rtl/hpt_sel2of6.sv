// hpt_sel2of6: picks the two highest-pT candidates out of six ("2-out-of-6 select").
//
// Highest pT means smallest |delta|. Instead of two cascaded priority encoders (two clocks),
// every candidate is compared with every other one in parallel: candidate i beats j when it
// is valid and j is not, or both are valid and |delta_i| < |delta_j|, or they tie and i has
// the lower index. A candidate beaten by nobody is the first pick, one beaten by exactly one
// other is the second. Purely combinational, so it fits in the same clock as the matrix.
//
// The task (two best of six, in a few ns instead of two clocks) follows the design
// description; the all-pairs comparison and the tie rule are own choices.
module hpt_sel2of6
  import tgc_pkg::*;
#(
  parameter int unsigned N = HPT_NBLK
) (
  input  hpt_cand_t cand [N],
  output hpt_cand_t sel  [2]
);
  logic [N-1:0] beats [N];   // beats[i][j]: i ranks above j
  int unsigned  rank  [N];

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        beats[i][j] = (i != j) &&
                      ((cand[i].valid && !cand[j].valid) ||
                       (cand[i].valid && cand[j].valid &&
                        ((abs5(cand[i].delta) < abs5(cand[j].delta)) ||
                         (abs5(cand[i].delta) == abs5(cand[j].delta) && i < j))));
    for (int j = 0; j < N; j++) begin
      rank[j] = 0;
      for (int i = 0; i < N; i++) rank[j] += beats[i][j] ? 1 : 0;
    end
    sel[0] = '0;
    sel[1] = '0;
    for (int j = 0; j < N; j++) begin
      if (rank[j] == 0 && cand[j].valid) sel[0] = cand[j];
      if (rank[j] == 1 && cand[j].valid) sel[1] = cand[j];
    end
  end
endmodule
