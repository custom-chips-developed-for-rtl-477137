// slb_link_tx_tb: sends random frames through the local slave link transmitter, rebuilds
// them from synch and the two data lines and checks content and the frame length of FW/2
// clocks (frames follow each other without gaps while records are waiting).
module slb_link_tx_tb;
  localparam int FW = 20, NCLK = FW/2;
  logic clk = 0, rst_n = 0;
  logic          fifo_empty, fifo_rd, link_clk, link_sync, busy;
  logic [FW-1:0] fifo_dout;
  logic [1:0]    link_data;
  logic [FW-1:0] sentq [$], rxq [$];
  logic [FW-1:0] shreg;
  int cyc = 0, checks = 0, failures = 0, nbits = -1, last_sync = -1, gaps_ok = 0;

  slb_link_tx #(.FW(FW)) dut (.clk(clk), .rst_n(rst_n), .fifo_empty(fifo_empty), .fifo_dout(fifo_dout),
    .fifo_rd(fifo_rd), .link_clk(link_clk), .link_sync(link_sync), .link_data(link_data), .busy(busy));

  always #5 clk = ~clk;

  // FIFO model in front of the transmitter
  logic [FW-1:0] fifo [$];
  assign fifo_empty = (fifo.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : fifo[0];
  always @(posedge clk) if (rst_n && fifo_rd) begin
    sentq.push_back(fifo[0]);
    void'(fifo.pop_front());
  end

  // receiver
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (link_sync) begin
      if (last_sync >= 0) begin
        checks++;
        if (cyc - last_sync < NCLK) begin failures++; $display("FAIL frame too short"); end
        if (cyc - last_sync == NCLK) gaps_ok++;
      end
      last_sync = cyc;
      shreg = '0; shreg[1:0] = link_data; nbits = 2;
    end else if (nbits > 0 && nbits < FW) begin
      shreg[nbits +: 2] = link_data; nbits += 2;
    end
    if (nbits == FW) begin rxq.push_back(shreg); nbits = -1; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (link_clk !== clk) failures++;
    for (int n = 0; n < 60; n++) begin
      fifo.push_back({$urandom, $urandom});
      if (n % 10 == 0) repeat ($urandom_range(40)) @(negedge clk);
    end
    wait (fifo.size() == 0);
    repeat (NCLK + 5) @(negedge clk);
    checks++; if (rxq.size() != 60) begin failures++; $display("FAIL got %0d frames", rxq.size()); end
    while (rxq.size() && sentq.size()) begin
      checks++;
      if (rxq[0] !== sentq[0]) begin failures++; $display("FAIL frame %h exp %h", rxq[0], sentq[0]); end
      void'(rxq.pop_front()); void'(sentq.pop_front());
    end
    checks++; if (gaps_ok == 0) begin failures++; $display("FAIL no back-to-back frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
