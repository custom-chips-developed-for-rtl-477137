// pp_testpulse_tb: requests test pulses with random delays and masks and checks that the
// pulse appears delay+1 clocks after the request edge, one crossing long, on the masked
// channels only; requests while a pulse is pending and requests while disabled are ignored.
module pp_testpulse_tb;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0;
  logic           enable, tp_req;
  logic [7:0]     delay;
  logic [NCH-1:0] tp_mask, tp_out;
  int cyc = 0, checks = 0, failures = 0, due = -1;

  pp_testpulse #(.NCH(NCH), .DW(8)) dut (.clk(clk), .rst_n(rst_n), .enable(enable), .tp_req(tp_req),
    .delay(delay), .tp_mask(tp_mask), .tp_out(tp_out));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    enable = 1; tp_req = 0; delay = 0; tp_mask = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // output check for this clock
      checks++;
      if (cyc == due) begin
        if (tp_out !== tp_mask) begin failures++; $display("FAIL no pulse at %0d", cyc); end
        due = -1;
      end else if (tp_out !== '0) begin
        failures++; $display("FAIL stray pulse at %0d", cyc);
      end
      tp_req = 0;
      if (n % 1000 == 999) enable = ~enable;
      if ($urandom_range(20) == 0) begin
        tp_req = 1;
        if (due < 0 && enable) begin
          delay   = 8'($urandom_range(30));
          tp_mask = 16'($urandom) | 16'h1;
          due     = cyc + 1 + int'(delay) + 1;   // request sampled at edge cyc+1
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
