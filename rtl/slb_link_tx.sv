// slb_link_tx: local slave link transmitter of the slave-board chip.
//
// The link has four lines: clock, synch and two data bits. The transmitter pops one event
// record of FW bits from the derandomizer, raises synch for the first clock of the frame and
// sends the record two bits per clock, least significant bits first, FW/2 clocks in all.
// Between frames synch and data are low. The link clock is the chip clock, forwarded.
//
// The four lines follow the design description; the frame layout (no header, LSB first,
// one-clock synch at the frame start) is an own choice.
module slb_link_tx #(
  parameter int unsigned FW = 606   // frame width, even
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fifo_empty,
  input  logic [FW-1:0] fifo_dout,
  output logic          fifo_rd,
  output logic          link_clk,
  output logic          link_sync,
  output logic [1:0]    link_data,
  output logic          busy
);
  localparam int unsigned NCLK = FW/2;
  localparam int unsigned CW   = $clog2(NCLK+1);

  logic [FW-1:0] sh;
  logic [CW-1:0] left;

  assign link_clk = clk;
  assign busy     = (left != '0);
  assign fifo_rd  = !busy && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      left      <= '0;
      link_sync <= 1'b0;
      link_data <= 2'b00;
    end else if (fifo_rd) begin
      sh        <= fifo_dout >> 2;
      left      <= CW'(NCLK - 1);
      link_sync <= 1'b1;
      link_data <= fifo_dout[1:0];
    end else if (busy) begin
      sh        <= sh >> 2;
      left      <= left - 1'b1;
      link_sync <= 1'b0;
      link_data <= sh[1:0];
    end else begin
      link_sync <= 1'b0;
      link_data <= 2'b00;
    end
  end
endmodule
