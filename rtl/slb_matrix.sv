// slb_matrix: one half (A or B) of the slave-board coincidence matrix for the doublet.
//
// Rows are the 32 pivot-plane channels of this half, columns the reference-plane channels.
// Element (i, d) fires when pivot channel i and reference channel i+d are both hit, for a
// displacement d in -MAXD..+MAXD; reference input bit i+MAXD+d carries channel i+d. For
// each displacement the matrix ORs the elements over all rows. The primary encoder picks the
// displacement of the highest-pT track, which is the one closest to the diagonal (smallest
// |d|); the 16-4 encoder turns it into a 4-bit two's complement code. The chosen displacement
// is fed back into the matrix: row_hit lists the pivot channels that match at that
// displacement and goes on to the decluster block.
//
// Following the design description: the matrix/diagonal principle, highest pT = closest to
// the diagonal, feedback of the primary encoder result to the matrix. Own choices: the
// window +-7 (taken from the printed "16-4" encoder width), and among equal |d| the negative
// displacement wins. Purely combinational; the enclosing chip registers the result.
module slb_matrix
  import tgc_pkg::*;
#(
  parameter int unsigned NPIV = SLB_PIV_BLK,
  parameter int unsigned MAXD = SLB_MAXD
) (
  input  logic [NPIV-1:0]        pivot,
  input  logic [NPIV+2*MAXD-1:0] refer,
  output logic                   valid,
  output logic [3:0]             delta,    // two's complement displacement
  output logic [NPIV-1:0]        row_hit   // pivot rows matching at the chosen displacement
);
  localparam int unsigned ND = 2*MAXD + 1;

  logic [ND-1:0]   disp_hit;               // index k <-> d = k - MAXD
  logic [NPIV-1:0] coin [ND];
  logic [$clog2(ND)-1:0] ksel;

  always_comb begin
    for (int k = 0; k < ND; k++) begin
      for (int i = 0; i < NPIV; i++)
        coin[k][i] = pivot[i] & refer[i+k];
      disp_hit[k] = |coin[k];
    end
  end

  // primary encoder: search outward from the diagonal
  always_comb begin
    valid = 1'b0;
    ksel  = '0;
    for (int a = MAXD; a >= 0; a--) begin
      if (disp_hit[MAXD+a]) begin valid = 1'b1; ksel = ($clog2(ND))'(MAXD+a); end
      if (disp_hit[MAXD-a]) begin valid = 1'b1; ksel = ($clog2(ND))'(MAXD-a); end
    end
  end

  // 16-4 encoder output and feedback to the matrix
  assign delta   = 4'(int'(ksel) - int'(MAXD));
  assign row_hit = valid ? coin[ksel] : '0;

endmodule
