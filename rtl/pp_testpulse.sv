// pp_testpulse: test pulse generator of the patch-panel chip.
//
// A test-pulse request (from the timing system) starts a down-counter loaded with the
// programmed delay; when it expires, the chip drives a pulse one crossing long on every
// channel selected by tp_mask, to be sent to the front-end boards. Requests that arrive while
// a pulse is pending are ignored. With delay D the pulse appears D+1 clocks after the clock
// edge that samples the request.
//
// Generating test pulses for the front-end timing calibration follows the design
// description; the programmable delay, the mask and the request handling are own choices.
module pp_testpulse #(
  parameter int unsigned NCH = 16,
  parameter int unsigned DW  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic           tp_req,
  input  logic [DW-1:0]  delay,
  input  logic [NCH-1:0] tp_mask,
  output logic [NCH-1:0] tp_out
);
  logic          pending;
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      cnt     <= '0;
      tp_out  <= '0;
    end else begin
      tp_out <= '0;
      if (pending) begin
        if (cnt == '0) begin
          pending <= 1'b0;
          tp_out  <= tp_mask;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end else if (tp_req && enable) begin
        pending <= 1'b1;
        cnt     <= delay;
      end
    end
  end
endmodule
