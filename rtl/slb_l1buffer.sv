// slb_l1buffer: level-1 buffer of the slave-board chip.
//
// A pipeline memory that holds every crossing's record for the level-1 trigger latency.
// It is a circular RAM of DEPTH words written at every clock edge; the value of dout after
// clock edge t is din as sampled at edge t - latency. latency is programmable at run time
// between 1 and DEPTH-1 (0 would read the oldest word, DEPTH crossings back).
//
// The buffer itself, holding the hit pattern, trigger result and crossing number for about
// 2.5 us (100 crossings) with a programmable length, follows the design description. The
// depth of 128 and the circular-RAM form are own choices.
module slb_l1buffer #(
  parameter int unsigned W     = 194,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] latency,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign rp = wp - latency;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp <= '0;
    else        wp <= wp + AW'(1);
  end

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    dout    <= mem[rp];
  end
endmodule
