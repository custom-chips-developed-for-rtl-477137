// slb_derandomizer: derandomizer of the slave-board chip.
//
// On every level-1 accept the event record is copied out of the level-1 buffer into a FIFO
// of DEPTH entries. An entry holds the event number and three crossings: the accepted one
// and the ones just before and just after it. The crossing after the accepted one leaves
// the level-1 buffer one clock after the accept, so the copy is made one clock late from a
// two-stage shift register behind the buffer output. The FIFO shows its oldest entry on
// dout while not empty; rd pops it. An accept that finds the FIFO full is dropped and
// counted in `overflow` (sticky flag).
//
// Depth 16, the copy on accept, the added event number and the neighbouring crossings follow
// the design description; the entry layout {l1id, next, current, previous} (previous in the
// low bits) and the overflow behaviour are own choices.
module slb_derandomizer #(
  parameter int unsigned W     = 194,
  parameter int unsigned IDW   = 24,
  parameter int unsigned DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [W-1:0]       l1b_out,   // level-1 buffer output stream
  input  logic               l1a,       // level-1 accept for crossing now at l1b_out
  input  logic [IDW-1:0]     l1id,      // event number of this accept
  input  logic               rd,
  output logic               empty,
  output logic               full,
  output logic               overflow,
  output logic [IDW+3*W-1:0] dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned EW = IDW + 3*W;

  logic [W-1:0]   s1, s2;         // l1b_out delayed by one and two clocks
  logic           l1a_d;
  logic [IDW-1:0] l1id_d;
  logic [EW-1:0]  mem [DEPTH];
  logic [AW:0]    wp, rp;
  logic           wr, pop;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign wr    = l1a_d && !full;
  assign pop   = rd && !empty;
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    s1 <= l1b_out;
    s2 <= s1;
    if (wr) mem[wp[AW-1:0]] <= {l1id_d, l1b_out, s1, s2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_d    <= 1'b0;
      l1id_d   <= '0;
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      l1a_d  <= l1a;
      l1id_d <= l1id;
      if (wr)  wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
      if (l1a_d && full) overflow <= 1'b1;
    end
  end

  // a pop is only meaningful on a non-empty FIFO
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);
endmodule
