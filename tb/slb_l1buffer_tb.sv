// slb_l1buffer_tb: checks that the level-1 buffer returns every word exactly `latency`
// clocks after it was written, for several latencies including the largest one.
module slb_l1buffer_tb;
  localparam int W = 32, DEPTH = 128;
  logic clk = 0, rst_n = 0;
  logic [6:0]   latency;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [int];
  int cyc = 0, checks = 0, failures = 0, settle = 0;

  slb_l1buffer #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .latency(latency), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    hist[cyc] = din;
  end

  initial begin
    latency = 7'd100; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 5; phase++) begin
      case (phase)
        0: latency = 7'd100;   // about 2.5 us at 40 MHz
        1: latency = 7'd1;
        2: latency = 7'd127;
        3: latency = 7'd37;
        default: latency = 7'd2;
      endcase
      settle = cyc + 130;
      repeat (400) begin
        @(negedge clk);
        if (cyc > settle && cyc - int'(latency) >= 1) begin
          checks++;
          if (dout !== hist[cyc - int'(latency)]) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d lat=%0d got %h exp %h", cyc, latency, dout, hist[cyc - int'(latency)]);
          end
        end
        din = $urandom;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
