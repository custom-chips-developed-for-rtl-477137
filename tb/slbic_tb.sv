// slbic_tb: slave-board chip in doublet wire mode with the default sizes.
// Single tracks at random pivot channels and displacements are sent with random noise-free
// gaps; the trigger output must show each one two clocks later. Level-1 accepts are raised
// latency+3 clocks after chosen tracks; the events are rebuilt from the local slave link and
// their hit patterns, crossing numbers, trigger words and event numbers are checked against
// what was sent. A triplet-strip pass checks that the mode pins switch the scheme.
module slbic_tb;
  import tgc_pkg::*;
  localparam int L   = 40;
  localparam int EW  = L1ID_W + 3*SLB_RO_W;
  localparam int NCL = EW/2;
  logic clk = 0, rst_n = 0;
  slb_mode_e          mode;
  logic [SLB_NIN-1:0] hit_in;
  logic               bcr, ecr, l1a;
  slb_trig_t          trig_out;
  logic               link_clk, link_sync, dr_overflow;
  logic [1:0]         link_data;
  logic [SLB_NIN-1:0] hist  [int];
  int                 expd  [int];   // expected slot data per crossing, -1 = none
  int                 expsl [int];
  int                 accq  [$];     // accepted crossings
  logic [EW-1:0]      rxq   [$];
  logic [EW-1:0]      shreg;
  int cyc = 0, checks = 0, failures = 0, nbits = -1, n_trk = 0;

  slbic dut (.clk(clk), .rst_n(rst_n), .mode(mode), .hit_in(hit_in), .bcr(bcr), .ecr(ecr),
    .l1a(l1a), .latency(7'(L)), .trig_out(trig_out), .link_clk(link_clk), .link_sync(link_sync),
    .link_data(link_data), .dr_overflow(dr_overflow));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (link_sync) begin shreg = '0; shreg[1:0] = link_data; nbits = 2; end
    else if (nbits > 0 && nbits < EW) begin shreg[nbits +: 2] = link_data; nbits += 2; end
    if (nbits == EW) begin rxq.push_back(shreg); nbits = -1; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k0, bc0;
    mode = MODE_DOUBLET_WIRE; hit_in = '0; bcr = 0; ecr = 0; l1a = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // check trigger output of the crossing sampled two edges ago
      if (expd.exists(cyc - 1)) begin
        for (int s = 0; s < SLB_NSLOT; s++) begin
          checks++;
          if (trig_out[s].valid !== (expsl[cyc-1] == s) ||
              (expsl[cyc-1] == s && int'(trig_out[s].data) != expd[cyc-1])) begin
            failures++;
            $display("FAIL trig crossing %0d slot %0d got %0b/%h", cyc-1, s, trig_out[s].valid, trig_out[s].data);
          end
        end
      end
      // level-1 accept for chosen crossings
      l1a = 0;
      foreach (accq[i]) if (accq[i] + L + 2 == cyc) l1a = 1;
      // next crossing
      hit_in = '0;
      if (n % 4 == 0 && n < 360) begin
        int p, d;
        p = $urandom_range(63); d = int'($urandom_range(14)) - 7;
        hit_in[p] = 1'b1; hit_in[64 + p + 7 + d] = 1'b1;
        expsl[cyc+1] = p / 32;
        expd[cyc+1]  = ((d & 15) << 5) | (p % 32);
        if (n % 40 == 0) accq.push_back(cyc + 1);
      end else begin
        expsl[cyc+1] = -1; expd[cyc+1] = 0;
      end
      hist[cyc+1] = hit_in;
    end
    hit_in = '0; l1a = 0;
    repeat (NCL * 12) @(negedge clk);
    // rebuild events
    checks++;
    if (rxq.size() != accq.size()) begin failures++; $display("FAIL %0d events for %0d accepts", rxq.size(), accq.size()); end
    for (int e = 0; e < rxq.size() && e < accq.size(); e++) begin
      logic [SLB_RO_W-1:0] pr, cu, nx; logic [L1ID_W-1:0] id; int k;
      {id, nx, cu, pr} = rxq[e];
      k = accq[e];
      checks += 6;
      if (id != L1ID_W'(e)) begin failures++; $display("FAIL event number %0d exp %0d", id, e); end
      if (cu[SLB_NIN-1:0] !== hist[k])   begin failures++; $display("FAIL event %0d current hits", e); end
      if (pr[SLB_NIN-1:0] !== (hist.exists(k-1) ? hist[k-1] : '0)) begin failures++; $display("FAIL event %0d previous hits", e); end
      if (nx[SLB_NIN-1:0] !== hist[k+1]) begin failures++; $display("FAIL event %0d next hits", e); end
      if (cu[SLB_RO_W-1 -: BCID_W] != pr[SLB_RO_W-1 -: BCID_W] + 1 ||
          nx[SLB_RO_W-1 -: BCID_W] != cu[SLB_RO_W-1 -: BCID_W] + 1) begin failures++; $display("FAIL bcid sequence"); end
      if (e == 0) begin k0 = k; bc0 = int'(cu[SLB_RO_W-1 -: BCID_W]); end
      else if (int'(cu[SLB_RO_W-1 -: BCID_W]) - bc0 != k - k0) begin failures++; $display("FAIL bcid distance"); end
      begin
        slb_trig_t tr; tr = cu[SLB_NIN +: SLB_TRIG_W];
        if (!tr[expsl[k]].valid || int'(tr[expsl[k]].data) != expd[k]) begin failures++; $display("FAIL event %0d trigger word", e); end
      end
    end
    checks++; if (dr_overflow) failures++;
    // mode switch: triplet strip, OR of inner/outer
    mode = MODE_TRIPLET_STRIP;
    hit_in = '0; hit_in[32+7] = 1; hit_in[20] = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (!trig_out[0].valid || trig_out[0].data != 7 || !trig_out[2].valid || trig_out[2].data != 20 ||
        trig_out[1].valid || trig_out[3].valid) begin failures++; $display("FAIL triplet strip mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
