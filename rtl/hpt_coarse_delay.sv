// hpt_coarse_delay: coarse delay of a high-pT chip input bus, in whole crossings.
//
// A chain of MAXDLY registers; the output is taken from the tap selected by `dly`, so the
// bus comes out dly clocks late (dly = 0 passes it straight through). It lets inputs arriving
// over cables of different length be brought to the same crossing before the matrix.
//
// The block and its place in front of the input buffer are printed in the chip's block
// diagram; its range (0..7 crossings) and the tap-select structure are own choices.
module hpt_coarse_delay #(
  parameter int unsigned W      = 8,
  parameter int unsigned MAXDLY = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(MAXDLY+1)-1:0]   dly,
  input  logic [W-1:0]                  din,
  output logic [W-1:0]                  dout
);
  logic [W-1:0] tap [MAXDLY+1];

  assign tap[0] = din;

  for (genvar k = 1; k <= MAXDLY; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tap[k] <= '0;
      else        tap[k] <= tap[k-1];
    end
  end

  assign dout = (int'(dly) <= MAXDLY) ? tap[dly] : tap[MAXDLY];
endmodule
