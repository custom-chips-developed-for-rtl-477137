// hpt_coarse_delay_tb: checks every delay setting 0..7 against a history of the input.
module hpt_coarse_delay_tb;
  localparam int W = 12, MAXDLY = 7;
  logic clk = 0, rst_n = 0;
  logic [2:0]   dly;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [int];
  int cyc = 0, checks = 0, failures = 0;

  hpt_coarse_delay #(.W(W), .MAXDLY(MAXDLY)) dut (.clk(clk), .rst_n(rst_n), .dly(dly), .din(din), .dout(dout));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0; dly = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d <= MAXDLY; d++) begin
      dly = 3'(d);
      for (int n = 0; n < 100; n++) begin
        din = W'($urandom);
        hist[cyc] = din;           // value present between edge cyc and cyc+1
        #1;
        if (n > MAXDLY) begin
          checks++;
          if (dout !== hist[cyc - d]) begin
            failures++;
            $display("FAIL dly=%0d got %h exp %h", d, dout, hist[cyc - d]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
