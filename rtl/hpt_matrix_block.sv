// hpt_matrix_block: one of the six blocks of the high-pT coincidence matrix.
//
// The block takes one doublet candidate (its position inside the 32-position block selects
// the matrix row) and the triplet hit columns that can pair with it. Column input bit
// pos+MAXD+d is the triplet column at displacement d. The hit detector checks every d in the
// window -maxd..+maxd (maxd chosen at run time, up to MAXD: wider for wires than for strips)
// and the primary encoder keeps the one closest to the diagonal, which is the highest-pT
// track; among equal |d| the negative one wins. Combinational.
//
// One candidate per block, chosen by the closest-to-diagonal rule, follows the design
// description; the window sizes and the tie rule are own choices.
module hpt_matrix_block #(
  parameter int unsigned NPOS = 32,
  parameter int unsigned MAXD = 15
) (
  input  logic                    row_valid,
  input  logic [$clog2(NPOS)-1:0] row_pos,
  input  logic [NPOS+2*MAXD-1:0]  cols,
  input  logic [4:0]              maxd,     // active window half-width, <= MAXD
  output logic                    valid,
  output logic [4:0]              delta     // two's complement
);
  logic [2*MAXD:0] hitd;   // index k <-> d = k - MAXD

  always_comb begin
    for (int k = 0; k <= 2*MAXD; k++)
      hitd[k] = row_valid && cols[int'(row_pos) + k]
                && ((k >= MAXD) ? (k - MAXD) : (MAXD - k)) <= int'(maxd);
    valid = 1'b0;
    delta = '0;
    for (int a = MAXD; a >= 0; a--) begin
      if (hitd[MAXD+a]) begin valid = 1'b1; delta = 5'(a);  end
      if (hitd[MAXD-a]) begin valid = 1'b1; delta = 5'(-a); end
    end
  end
endmodule
