// slb_derandomizer_tb: feeds a numbered crossing stream, raises level-1 accepts at random
// and checks that each FIFO entry holds the accepted crossing, its two neighbours and the
// event number, in order. A burst of accepts without reading checks the depth of 16 and the
// overflow flag.
module slb_derandomizer_tb;
  localparam int W = 16, IDW = 8, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0]       l1b_out;
  logic               l1a, rd, empty, full, overflow;
  logic [IDW-1:0]     l1id;
  logic [IDW+3*W-1:0] dout;
  logic [IDW+3*W-1:0] expq [$];
  int cyc = 0, checks = 0, failures = 0, n_acc = 0;

  slb_derandomizer #(.W(W), .IDW(IDW), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .l1b_out(l1b_out), .l1a(l1a), .l1id(l1id), .rd(rd),
    .empty(empty), .full(full), .overflow(overflow), .dout(dout));

  always #5 clk = ~clk;

  // crossing stream: the value at the buffer output after edge k is k
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign l1b_out = W'(cyc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic accept();
    // accept sampled at this edge: current crossing = l1b_out now
    expq.push_back({IDW'(n_acc), W'(cyc + 1), W'(cyc), W'(cyc - 1)});
    l1a = 1; l1id = IDW'(n_acc); n_acc++;
  endtask

  initial begin
    l1a = 0; rd = 0; l1id = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // random accepts and reads
    repeat (3000) begin
      @(negedge clk);
      l1a = 0;
      rd  = 0;
      if (!empty && $urandom_range(2) == 0) begin
        rd = 1;
        checks++;
        if (expq.size() == 0 || dout !== expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h", dout, expq.size() ? expq[0] : '0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
      if ($urandom_range(5) == 0 && expq.size() < DEPTH - 1) accept();
    end
    @(negedge clk); l1a = 0; rd = 0;
    // drain
    repeat (4) @(negedge clk);
    while (!empty) begin
      rd = 1; checks++;
      if (dout !== expq[0]) failures++;
      void'(expq.pop_front());
      @(negedge clk);
    end
    rd = 0;
    checks++; if (overflow) failures++;
    // burst: 20 accepts, only 16 fit
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      if (k < DEPTH) accept(); else begin l1a = 1; l1id = IDW'(n_acc); n_acc++; end
    end
    @(negedge clk); l1a = 0;
    repeat (3) @(negedge clk);
    checks++; if (!full || !overflow) begin failures++; $display("FAIL no overflow"); end
    while (!empty) begin
      rd = 1; checks++;
      if (dout !== expq[0]) begin failures++; $display("FAIL burst got %h exp %h", dout, expq[0]); end
      void'(expq.pop_front());
      @(negedge clk);
    end
    rd = 0;
    checks++; if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
