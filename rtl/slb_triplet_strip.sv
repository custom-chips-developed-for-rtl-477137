// slb_triplet_strip: low-pT trigger for the triplet strips, 1-out-of-2 (OR) coincidence.
//
// Only the inner and outer triplet planes carry strips, so a channel position fires when
// either plane is hit. The NCH positions are split between two identical logics (lower and
// upper half); each reports its first NCAND firing positions, lowest first, so the chip gives
// at most 2*NCAND candidates as channel indices with a valid bit. Combinational.
//
// The OR rule, the two identical logics and the four candidates follow the design
// description; splitting the 32 channels into two halves of 16 is an own choice.
module slb_triplet_strip #(
  parameter int unsigned NCH   = 32,
  parameter int unsigned NCAND = 2
) (
  input  logic [NCH-1:0]           inner, outer,
  output logic [2*NCAND-1:0]       valid,
  output logic [$clog2(NCH)-1:0]   pos [2*NCAND]
);
  localparam int unsigned H = NCH/2;
  logic [NCH-1:0] coin;
  int unsigned n;

  assign coin = inner | outer;

  always_comb begin
    valid = '0;
    for (int c = 0; c < 2*NCAND; c++) pos[c] = '0;
    for (int h = 0; h < 2; h++) begin
      n = 0;
      for (int unsigned i = 0; i < H; i++) begin
        if (coin[h*H+i] && n < NCAND) begin
          valid[h*NCAND+n] = 1'b1;
          pos[h*NCAND+n]   = ($clog2(NCH))'(h*H+i);
          n                = n + 1;
        end
      end
    end
  end
endmodule
