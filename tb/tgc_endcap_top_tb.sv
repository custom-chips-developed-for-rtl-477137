// tgc_endcap_top_tb: end-to-end test of the trigger/readout chain at its default sizes
// (three doublet slave boards, one triplet slave board, 34 patch-panel chips, one high-pT
// chip).
//
// Tracks are placed on the front-end pins and followed to the high-pT output, which must
// show the expected pair five clocks later (plus the coarse delay). The scenarios cover: low-
// and high-pT coincidences, the HH, HL and LL output combinations, declustering, the 2-out-
// of-3 triplet wire and OR triplet strip schemes (mode switch), the coincidence window change
// between wires and strips, the coarse delay, channel masking, a front-end pulse longer than
// one crossing, level-1 readout over the local slave link, derandomizer overflow, test
// pulses and a single event upset in a patch-panel register. Each mechanism is counted and
// one that never happens counts as a failure. The level-1 latency is set to 100 crossings
// (2.5 us).
module tgc_endcap_top_tb;
  import tgc_pkg::*;
  localparam int L   = 100;  // level-1 latency: 2.5 us at 25 ns crossings
  localparam int EW  = L1ID_W + 3*SLB_RO_W;
  localparam int NPPD = 9, NPPT = 7, NDS = 3;

  logic clk = 0, rst_n = 0;
  logic strip_sel, tp_req, reg_we, seu_seen, inj_en, bcr, ecr, l1a;
  logic [NDS-1:0][NPPD*PP_NCH-1:0] asd_doublet, tp_doublet;
  logic [NPPT*PP_NCH-1:0]          asd_triplet, tp_triplet;
  logic [5:0]            reg_chip;
  logic [PP_AW-1:0]      reg_addr;
  logic [PP_REG_W-1:0]   reg_wdata, reg_rdata, inj_mask;
  logic [1:0]            inj_copy;
  logic [2:0]            dly_d, dly_t;
  hpt_cand_t             hpt_out [2];
  slb_trig_t             trig_triplet;
  logic [NDS:0]          link_clk, link_sync, dr_overflow;
  logic [NDS:0][1:0]     link_data;

  tgc_endcap_top dut (
    .clk(clk), .rst_n(rst_n), .strip_sel(strip_sel),
    .asd_doublet(asd_doublet), .asd_triplet(asd_triplet), .tp_req(tp_req),
    .tp_doublet(tp_doublet), .tp_triplet(tp_triplet),
    .reg_we(reg_we), .reg_chip(reg_chip), .reg_addr(reg_addr), .reg_wdata(reg_wdata),
    .reg_rdata(reg_rdata), .seu_seen(seu_seen), .inj_en(inj_en), .inj_copy(inj_copy), .inj_mask(inj_mask),
    .bcr(bcr), .ecr(ecr), .l1a(l1a), .l1_latency(7'(L)),
    .hpt_dly_doublet(dly_d), .hpt_dly_triplet(dly_t),
    .hpt_out(hpt_out), .trig_triplet(trig_triplet),
    .link_clk(link_clk), .link_sync(link_sync), .link_data(link_data), .dr_overflow(dr_overflow));

  int cyc = 0, checks = 0, failures = 0;
  // mechanism counters
  int n_low = 0, n_high = 0, n_hh = 0, n_hl = 0, n_ll = 0, n_declust = 0, n_tw = 0, n_ts = 0,
      n_window = 0, n_coarse = 0, n_mask = 0, n_bcid = 0, n_readout = 0, n_overflow = 0,
      n_tp = 0, n_seu = 0, n_mode = 0;

  always #5 clk = ~clk;

  // link receivers
  logic [EW-1:0] shreg [NDS+1];
  int            nbits [NDS+1];
  logic [EW-1:0] rxq   [NDS+1][$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int s = 0; s <= NDS; s++) begin
      if (link_sync[s]) begin shreg[s] = '0; shreg[s][1:0] = link_data[s]; nbits[s] = 2; end
      else if (nbits[s] > 0 && nbits[s] < EW) begin shreg[s][nbits[s] +: 2] = link_data[s]; nbits[s] += 2; end
      if (nbits[s] == EW) begin rxq[s].push_back(shreg[s]); nbits[s] = -1; end
    end
  end

  always @(posedge clk) if (seu_seen) n_seu++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------ helpers
  function automatic hpt_cand_t cand(logic high, int blk, int pos, int delta);
    return '{1'b1, high, 3'(blk), 5'(pos), 5'(delta)};
  endfunction

  // doublet track on board s at pivot channel p (0..63) with low-pT displacement d
  task automatic put_doublet(int s, int p, int d);
    asd_doublet[s][p] = 1'b1;
    asd_doublet[s][64 + p + 7 + d] = 1'b1;
  endtask

  task automatic put_trip_wire(int c);   // planes 1 and 2 hit: 2-out-of-3
    asd_triplet[c] = 1'b1;
    asd_triplet[36 + c] = 1'b1;
  endtask

  task automatic wr(int chip, int a, int d);
    @(negedge clk); reg_we = 1; reg_chip = 6'(chip); reg_addr = PP_AW'(a); reg_wdata = PP_REG_W'(d);
    @(negedge clk); reg_we = 0;
  endtask

  // keep the prepared pattern on the pins for one crossing; return its sampling edge
  task automatic fire(output int e);
    @(negedge clk);
    e = cyc;
  endtask

  task automatic clear_pins();
    asd_doublet = '0; asd_triplet = '0;
  endtask

  // wait until the output of the crossing sampled at edge e is visible and compare
  task automatic expect_out(int e, hpt_cand_t e0, hpt_cand_t e1, string what);
    while (cyc < e + 4 + int'(dly_d)) @(negedge clk);
    checks += 2;
    if (hpt_out[0] !== e0 || hpt_out[1] !== e1) begin
      failures++;
      $display("FAIL %s: got %p / %p exp %p / %p", what, hpt_out[0], hpt_out[1], e0, e1);
      return;
    end
    if (e0.valid) n_low++;
    if (e0.valid && e0.high) n_high++;
    if (e1.valid && e1.high) n_hh++;
    else if (e0.valid && e0.high && e1.valid) n_hl++;
    else if (e1.valid && !e0.high) n_ll++;
  endtask

  task automatic gap(int n);
    repeat (n) @(negedge clk);
  endtask

  // ------------------------------------------------------------------ scenario
  initial begin
    int e, e_ro, e_ts;
    hpt_cand_t none;
    none = '0;
    strip_sel = 0; tp_req = 0; reg_we = 0; reg_chip = 0; reg_addr = 0; reg_wdata = 0;
    inj_en = 0; inj_copy = 0; inj_mask = 0; bcr = 0; ecr = 0; l1a = 0; dly_d = 0; dly_t = 0;
    for (int s = 0; s <= NDS; s++) nbits[s] = -1;
    clear_pins();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // enable every channel of every patch-panel chip
    for (int c = 0; c < NDS*NPPD + NPPT; c++) wr(c, PP_REG_MASK, 16'hffff);
    @(negedge clk); bcr = 1; ecr = 1;
    @(negedge clk); bcr = 0; ecr = 0;
    gap(5);

    // 1. HH: block 0 (board 0 pivot 5, low d +1) meets triplet 7 (d=+2);
    //        block 1 (board 0 pivot 34, low d -3) meets triplet 30 (d=30-32-2=-4)
    put_doublet(0, 5, 1); put_doublet(0, 34, -3);
    put_trip_wire(7); asd_triplet[36+30] = 1; asd_triplet[72+30] = 1;
    fire(e); clear_pins(); e_ro = e;
    expect_out(e, cand(1, 0, 5, 2), cand(1, 1, 2, -4), "HH");
    if (hpt_out[0].high && hpt_out[1].high) n_tw++;
    gap(10);

    // 2. HL: block 0 high (pivot 9, triplet 9, d=0), block 4 (board 2 pivot 20, low d -2) low only
    put_doublet(0, 9, 5); put_trip_wire(9); put_doublet(2, 20, -2);
    fire(e); clear_pins();
    expect_out(e, cand(1, 0, 9, 0), cand(0, 4, 20, -2), "HL");
    gap(10);

    // 3. LL and declustering: board 1 half A has a 3-channel cluster 10..12 (d=0, centre 11),
    //    board 2 half B a single track at pivot 40 with d=+4; no triplet hits
    for (int p = 10; p <= 12; p++) begin asd_doublet[1][p] = 1; asd_doublet[1][64 + p + 7] = 1; end
    put_doublet(2, 40, 4);
    fire(e); clear_pins();
    expect_out(e, cand(0, 2, 11, 0), cand(0, 5, 8, 4), "LL with decluster");
    if (hpt_out[0].pos == 11) n_declust++;
    gap(10);

    // 4. a single triplet plane is not a triplet wire coincidence: block 0 stays low
    put_doublet(0, 5, 1); asd_triplet[72+7] = 1;
    fire(e); clear_pins();
    expect_out(e, cand(0, 0, 5, 1), none, "single triplet plane");
    gap(10);

    // 5. channel mask: disable chip 0 (board 0 pivots 0..15): the track at pivot 5 vanishes
    wr(0, PP_REG_MASK, 16'h0000);
    put_doublet(0, 5, 1); put_doublet(1, 50, 2);
    fire(e); clear_pins();
    expect_out(e, cand(0, 3, 18, 2), none, "masked chip");
    if (hpt_out[0].blk == 3) n_mask++;
    wr(0, PP_REG_MASK, 16'hffff);
    gap(10);

    // 6. front-end pulse held for 4 crossings gives one crossing only
    put_doublet(0, 3, 0);
    fire(e); fire(e); fire(e); fire(e); clear_pins();
    e = e - 3;
    expect_out(e, cand(0, 0, 3, 0), none, "long pulse, first crossing");
    @(negedge clk);
    checks++;
    if (hpt_out[0].valid) begin failures++; $display("FAIL long pulse repeated"); end
    else n_bcid++;
    gap(10);

    // 7. coarse delay 3 on both high-pT input buses: same HH pair, 3 clocks later
    dly_d = 3; dly_t = 3;
    gap(10);
    put_doublet(0, 5, 1); put_trip_wire(7);
    fire(e); clear_pins();
    while (cyc < e + 4) @(negedge clk);
    checks++; if (hpt_out[0].valid) begin failures++; $display("FAIL coarse delay ignored"); end
    expect_out(e, cand(1, 0, 5, 2), none, "coarse delay");
    if (hpt_out[0].high) n_coarse++;
    dly_d = 0; dly_t = 0;
    gap(15);

    // 8. mode switch to strips: triplet strip OR (outer plane only), window +-7
    strip_sel = 1; n_mode++;
    gap(5);
    put_doublet(0, 5, 1); asd_triplet[32+8] = 1;    // d = +3: high
    put_doublet(0, 40, 2); asd_triplet[32+20] = 1;  // block 1 pivot 8: d = 20-32-8 = -20: no
    fire(e); clear_pins(); e_ts = e;
    expect_out(e, cand(1, 0, 5, 3), cand(0, 1, 8, 2), "strip OR");
    if (hpt_out[0].high) n_ts++;
    gap(10);
    // the wire window would accept d = +10, the strip window does not
    put_doublet(0, 5, 1); asd_triplet[15] = 1;      // d = +10
    fire(e); clear_pins();
    expect_out(e, cand(0, 0, 5, 1), none, "strip window");
    if (hpt_out[0].valid && !hpt_out[0].high) n_window++;
    strip_sel = 0;
    gap(10);
    put_doublet(0, 5, 1); put_trip_wire(15);
    fire(e); clear_pins();
    expect_out(e, cand(1, 0, 5, 10), none, "wire window");
    gap(10);

    // 9. level-1 readout of the first event (HH) is long past its latency; read out a new
    //    copy of it with the accept at the right time
    put_doublet(0, 5, 1); put_doublet(0, 34, -3);
    put_trip_wire(7); asd_triplet[36+30] = 1; asd_triplet[72+30] = 1;
    fire(e_ro); clear_pins();
    while (cyc < e_ro + L + 3) @(negedge clk);
    l1a = 1;
    @(negedge clk); l1a = 0;
    repeat (EW/2 + 20) @(negedge clk);
    for (int s = 0; s <= NDS; s++) begin
      checks++;
      if (rxq[s].size() != 1) begin failures++; $display("FAIL link %0d: %0d events", s, rxq[s].size()); end
    end
    if (rxq[0].size() == 1) begin
      logic [SLB_RO_W-1:0] pr, cu, nx; logic [L1ID_W-1:0] id; slb_trig_t tr;
      logic [SLB_NIN-1:0] exp_hits;
      {id, nx, cu, pr} = rxq[0][0];
      exp_hits = '0; exp_hits[5] = 1; exp_hits[64+5+7+1] = 1; exp_hits[34] = 1; exp_hits[64+34+7-3] = 1;
      tr = cu[SLB_NIN +: SLB_TRIG_W];
      checks += 5;
      if (id != 0) begin failures++; $display("FAIL event number %0d", id); end
      if (cu[SLB_NIN-1:0] !== exp_hits) begin failures++; $display("FAIL readout hits"); end
      if (pr[SLB_NIN-1:0] !== '0 || nx[SLB_NIN-1:0] !== '0) begin failures++; $display("FAIL readout neighbours"); end
      if (!tr[0].valid || tr[0].data != {4'd1, 5'd5} || !tr[1].valid || tr[1].data != {4'hd, 5'd2})
        begin failures++; $display("FAIL readout trigger words"); end
      if (nx[SLB_RO_W-1 -: BCID_W] != cu[SLB_RO_W-1 -: BCID_W] + 1) begin failures++; $display("FAIL readout bcid"); end
      else n_readout++;
    end
    if (rxq[3].size() == 1) begin
      logic [SLB_RO_W-1:0] pr, cu, nx; logic [L1ID_W-1:0] id; slb_trig_t tr;
      {id, nx, cu, pr} = rxq[3][0];
      tr = cu[SLB_NIN +: SLB_TRIG_W];
      checks++;
      if (!tr[0].valid || tr[0].data != 7 || !tr[1].valid || tr[1].data != 30) begin
        failures++; $display("FAIL triplet readout trigger words");
      end
    end

    // 10. test pulses: chip 27 (first triplet chip), delay 3, mask 00f0
    wr(27, PP_REG_TPMASK, 16'h00f0); wr(27, PP_REG_TPDLY, 3); wr(27, PP_REG_CTRL, 1);
    @(negedge clk); tp_req = 1;
    @(negedge clk); tp_req = 0;
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (k == 5) begin
        if (tp_triplet[15:0] !== 16'h00f0 || tp_doublet !== '0) begin failures++; $display("FAIL test pulse"); end
        else n_tp++;
      end else if (tp_triplet !== '0) begin failures++; $display("FAIL stray test pulse"); end
      @(negedge clk);
    end

    // 11. single event upset in a copy of chip 5's mask register
    reg_chip = 5; reg_addr = PP_REG_MASK; inj_copy = 1; inj_mask = 16'h0ff0; inj_en = 1;
    @(negedge clk); inj_en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (reg_rdata !== 16'hffff) begin failures++; $display("FAIL upset reached the register value"); end
    put_doublet(0, 20, 0);   // its reference hit (pin 91) passes through chip 5
    fire(e); clear_pins();
    expect_out(e, cand(0, 0, 20, 0), none, "after upset");

    // 12. derandomizer overflow: 20 accepts in a row
    for (int k = 0; k < 20; k++) begin @(negedge clk); l1a = 1; end
    @(negedge clk); l1a = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (dr_overflow !== '1) begin failures++; $display("FAIL no derandomizer overflow"); end
    else n_overflow++;

    // ---------------------------------------------------------------- mechanism summary
    begin
      int cnt [string];
      cnt["low-pT coincidence"] = n_low;   cnt["high-pT coincidence"] = n_high;
      cnt["HH"] = n_hh; cnt["HL"] = n_hl; cnt["LL"] = n_ll;
      cnt["decluster"] = n_declust; cnt["triplet 2-of-3"] = n_tw; cnt["triplet strip OR"] = n_ts;
      cnt["strip window"] = n_window; cnt["coarse delay"] = n_coarse; cnt["channel mask"] = n_mask;
      cnt["bcid single crossing"] = n_bcid; cnt["L1 readout"] = n_readout;
      cnt["derandomizer overflow"] = n_overflow; cnt["test pulse"] = n_tp;
      cnt["SEU repaired"] = n_seu; cnt["mode switch"] = n_mode;
      foreach (cnt[k]) begin
        $display("mechanism %-22s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
