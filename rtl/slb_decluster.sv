// slb_decluster: decluster block and 32-5 encoder of the slave-board chip.
//
// When a track fires several neighbouring pivot channels, only the central one is kept.
// The block finds the lowest-numbered run of consecutive set bits, takes its middle channel
// (the lower one of the two middles for an even run) and encodes it in $clog2(N) bits.
// Runs after the first one are ignored. Combinational.
//
// The central-channel rule follows the design description; taking the first run and
// rounding the middle down are own choices.
module slb_decluster #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         hits,
  output logic                 valid,
  output logic [$clog2(N)-1:0] pos
);
  int unsigned first, last;
  logic        in_run, done;

  always_comb begin
    first  = 0;
    last   = 0;
    in_run = 1'b0;
    done   = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (!done) begin
        if (hits[i]) begin
          if (!in_run) first = i;
          in_run = 1'b1;
          last   = i;
        end else if (in_run) begin
          done = 1'b1;
        end
      end
    end
    valid = |hits;
    pos   = ($clog2(N))'((first + last) >> 1);
  end
endmodule
