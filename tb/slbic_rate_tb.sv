// slbic_rate_tb: readout of the slave-board chip at the nominal level-1 rate.
//
// The chip runs with its default sizes at 40 MHz (25 ns crossings), with the level-1
// buffer latency set to 100 crossings (2.5 us) and random hit patterns in every crossing.
// Level-1 accepts arrive at random, one in 400 crossings on average, which is 100 kHz. The
// local slave link needs 303 clocks per event, so the link is about 76 % busy and the
// 16-deep derandomizer absorbs the bursts. A simple central-trigger busy is modelled: while
// 15 events are accepted but not yet fully received, an accept is held back and counted as
// dead time. 1000 events are rebuilt from the link. For each one the bench checks:
//   - the event number;
//   - the hit patterns of the accepted crossing and of its two neighbours;
//   - the trigger word, against the trigger output seen for that crossing;
//   - the crossing-number spacing to the first event, modulo the 3564-crossing orbit.
// It also checks that the derandomizer never overflows, and that the sustained accept rate
// is at least 90 kHz.
module slbic_rate_tb;
  import tgc_pkg::*;
  localparam int L     = 100;         // level-1 latency in crossings (2.5 us)
  localparam int NEV   = 1000;
  localparam int MEAN  = 400;         // mean crossings between accepts (100 kHz)
  localparam int BUSY  = 15;
  localparam int ORBIT = 3564;        // crossings per orbit; the crossing number wraps
  localparam int EW    = L1ID_W + 3*SLB_RO_W;
  logic clk = 0, rst_n = 0;
  slb_mode_e          mode;
  logic [SLB_NIN-1:0] hit_in;
  logic               bcr, ecr, l1a;
  slb_trig_t          trig_out;
  logic               link_clk, link_sync, dr_overflow;
  logic [1:0]         link_data;
  logic [SLB_NIN-1:0] hist [int];
  slb_trig_t          tobs [int];
  int                 accq [$];
  logic [EW-1:0]      shreg;
  int cyc = 0, checks = 0, failures = 0, nbits = -1;
  int n_acc = 0, n_rx = 0, n_held = 0, max_out = 0, first_acc = -1, last_acc = 0;
  int k0 = 0, bc0 = 0;

  slbic dut (.clk(clk), .rst_n(rst_n), .mode(mode), .hit_in(hit_in), .bcr(bcr), .ecr(ecr),
    .l1a(l1a), .latency(7'(L)), .trig_out(trig_out), .link_clk(link_clk), .link_sync(link_sync),
    .link_data(link_data), .dr_overflow(dr_overflow));

  always #12.5 clk = ~clk;

  task automatic check_event(input logic [EW-1:0] ev);
    logic [SLB_RO_W-1:0] pr, cu, nx;
    logic [L1ID_W-1:0]   id;
    int                  k;
    {id, nx, cu, pr} = ev;
    k = accq.pop_front();
    checks += 6;
    if (id != L1ID_W'(n_rx)) begin failures++; $display("FAIL event %0d number %0d", n_rx, id); end
    if (cu[SLB_NIN-1:0] !== hist[k])   begin failures++; $display("FAIL event %0d current hits", n_rx); end
    if (pr[SLB_NIN-1:0] !== hist[k-1]) begin failures++; $display("FAIL event %0d previous hits", n_rx); end
    if (nx[SLB_NIN-1:0] !== hist[k+1]) begin failures++; $display("FAIL event %0d next hits", n_rx); end
    if (cu[SLB_NIN +: SLB_TRIG_W] !== tobs[k]) begin failures++; $display("FAIL event %0d trigger word", n_rx); end
    if (n_rx == 0) begin k0 = k; bc0 = int'(cu[SLB_RO_W-1 -: BCID_W]); end
    else if ((int'(cu[SLB_RO_W-1 -: BCID_W]) - bc0 - (k - k0)) % ORBIT != 0) begin
      failures++; $display("FAIL event %0d crossing number", n_rx);
    end
    n_rx++;
  endtask

  // link receiver
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (link_sync) begin shreg = '0; shreg[1:0] = link_data; nbits = 2; end
    else if (nbits > 0 && nbits < EW) begin shreg[nbits +: 2] = link_data; nbits += 2; end
    if (nbits == EW) begin check_event(shreg); nbits = -1; end
  end

  initial begin
    repeat (NEV * MEAN * 2) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d events received", n_rx, NEV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode = MODE_DOUBLET_WIRE; hit_in = '0; bcr = 0; ecr = 0; l1a = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_rx < NEV) begin
      @(negedge clk);
      // trigger output of the crossing whose hits were sampled two edges ago
      tobs[cyc-1] = trig_out;
      // level-1 accept for a crossing old enough to have both neighbours recorded
      l1a = 0;
      if (n_acc < NEV && cyc > L + 8 && $urandom_range(MEAN-1) == 0) begin
        if (n_acc - n_rx >= BUSY) n_held++;
        else begin
          l1a = 1;
          accq.push_back(cyc - L - 2);
          if (first_acc < 0) first_acc = cyc;
          last_acc = cyc;
          n_acc++;
          if (n_acc - n_rx > max_out) max_out = n_acc - n_rx;
        end
      end
      // next crossing: sparse random hits
      hit_in = '0;
      for (int i = 0; i < 4; i++) hit_in[$urandom_range(SLB_NIN-1)] = 1'b1;
      hist[cyc+1] = hit_in;
    end
    checks++;
    if (dr_overflow) begin failures++; $display("FAIL derandomizer overflow"); end
    begin
      real khz;
      khz = 1.0e6 * real'(n_acc - 1) / (real'(last_acc - first_acc) * 25.0);
      checks++;
      if (khz < 90.0) begin failures++; $display("FAIL accept rate %0.1f kHz", khz); end
      $display("%0d events in %0d crossings: %0.1f kHz, %0d accepts held back by busy, at most %0d events outstanding",
               n_acc, last_acc - first_acc, khz, n_held, max_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
