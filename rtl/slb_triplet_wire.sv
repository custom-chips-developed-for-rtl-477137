// slb_triplet_wire: low-pT trigger for the triplet wires, 2-out-of-3 coincidence.
//
// Each of the NCH channel positions sees the same channel of the three triplet planes and
// fires when at least two of the three are hit. Up to NCAND firing positions are reported,
// lowest channel number first, as channel indices with a valid bit. Combinational.
//
// The 2-out-of-3 rule, the 36 channels per plane and the maximum of three candidates follow
// the design description; reporting the lowest channels first is an own choice.
module slb_triplet_wire #(
  parameter int unsigned NCH   = 36,
  parameter int unsigned NCAND = 3
) (
  input  logic [NCH-1:0]           pa, pb, pc,
  output logic [NCAND-1:0]         valid,
  output logic [$clog2(NCH)-1:0]   pos [NCAND]
);
  logic [NCH-1:0] coin;
  int unsigned n;

  assign coin = (pa & pb) | (pb & pc) | (pa & pc);

  always_comb begin
    valid = '0;
    for (int c = 0; c < NCAND; c++) pos[c] = '0;
    n = 0;
    for (int unsigned i = 0; i < NCH; i++) begin
      if (coin[i] && n < NCAND) begin
        valid[n] = 1'b1;
        pos[n]   = ($clog2(NCH))'(i);
        n        = n + 1;
      end
    end
  end
endmodule
