// hptic_tb: checks the high-pT chip against a reference model, for wires and strips and
// several coarse-delay settings. Random doublet candidates from six blocks meet random
// triplet candidates, a part of them placed on purpose inside the coincidence window, so
// HH, HL and LL outputs all occur. The model finds each block's closest triplet column,
// ranks highs and lows by |delta| and applies the H/L rule; the output must appear
// 2 + coarse-delay clocks after the inputs.
module hptic_tb;
  import tgc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic      strip_mode;
  logic [2:0] dly_d, dly_t;
  hpt_din_t  din [HPT_NBLK];
  hpt_tin_t  tin [HPT_NTRIP];
  hpt_cand_t out [2];
  hpt_din_t  hd [int][HPT_NBLK];
  hpt_tin_t  ht [int][HPT_NTRIP];
  int cyc = 0, checks = 0, failures = 0, n_hh = 0, n_hl = 0, n_ll = 0;

  hptic dut (.clk(clk), .rst_n(rst_n), .strip_mode(strip_mode), .dly_doublet(dly_d),
    .dly_triplet(dly_t), .din(din), .tin(tin), .out(out));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc++;

  function automatic int absi(int x); return x < 0 ? -x : x; endfunction

  // expected output for the doublet/triplet inputs of crossings cd and ct
  task automatic model(int cd, int ct, output hpt_cand_t e [2]);
    hpt_cand_t h [$], l [$];
    int maxd;
    maxd = strip_mode ? HPT_MAXD_S : HPT_MAXD_W;
    for (int k = 0; k < HPT_NBLK; k++) begin
      hpt_din_t dd; logic found; int best;
      dd = hd.exists(cd) ? hd[cd][k] : '0;
      found = 0; best = 0;
      if (dd.valid)
        for (int a = 0; a <= maxd && !found; a++)
          for (int sg = -1; sg <= 1 && !found; sg += 2)
            for (int t = 0; t < HPT_NTRIP; t++) begin
              hpt_tin_t tt; tt = ht.exists(ct) ? ht[ct][t] : '0;
              if (tt.valid && int'(tt.col) == k*32 + HPT_MAXD_W + int'(dd.pos) + sg*a) begin found = 1; best = sg*a; end
            end
      if (found) h.push_back('{1'b1, 1'b1, 3'(k), dd.pos, 5'(best)});
      else if (dd.valid) l.push_back('{1'b1, 1'b0, 3'(k), dd.pos, {dd.dlow[3], dd.dlow}});
    end
    // stable sort by |delta|
    for (int i = 1; i < h.size(); i++)
      for (int j = i; j > 0 && absi($signed(h[j].delta)) < absi($signed(h[j-1].delta)); j--) begin
        hpt_cand_t x; x = h[j]; h[j] = h[j-1]; h[j-1] = x; end
    for (int i = 1; i < l.size(); i++)
      for (int j = i; j > 0 && absi($signed(l[j].delta)) < absi($signed(l[j-1].delta)); j--) begin
        hpt_cand_t x; x = l[j]; l[j] = l[j-1]; l[j-1] = x; end
    e[0] = '0; e[1] = '0;
    if (h.size() >= 2)      begin e[0] = h[0]; e[1] = h[1]; end
    else if (h.size() == 1) begin e[0] = h[0]; if (l.size()) e[1] = l[0]; end
    else begin if (l.size() > 0) e[0] = l[0]; if (l.size() > 1) e[1] = l[1]; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hpt_cand_t e [2];
    strip_mode = 0; dly_d = 0; dly_t = 0;
    for (int k = 0; k < HPT_NBLK; k++) din[k] = '0;
    for (int t = 0; t < HPT_NTRIP; t++) tin[t] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 6; phase++) begin
      strip_mode = phase[0];
      dly_d = (phase >= 2) ? 3'(phase) : 3'd0;
      dly_t = (phase >= 4) ? 3'(phase - 1) : dly_d;
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        // check what the chip shows now (the first clocks after a setting change are skipped)
        if (cyc > 20 && n > 2) begin
          model(cyc - 1 - int'(dly_d), cyc - 1 - int'(dly_t), e);
          for (int s = 0; s < 2; s++) begin
            checks++;
            if (out[s] !== e[s]) begin
              failures++;
              if (failures < 10) $display("FAIL cyc=%0d out%0d got %p exp %p", cyc, s, out[s], e[s]);
            end
          end
          if (e[1].valid && e[1].high) n_hh++;
          else if (e[0].valid && e[0].high && e[1].valid) n_hl++;
          else if (e[1].valid && !e[0].high) n_ll++;
        end
        // new inputs, sampled at the next edge
        for (int k = 0; k < HPT_NBLK; k++) begin
          din[k].valid = ($urandom_range(2) == 0);
          din[k].pos   = 5'($urandom);
          din[k].dlow  = 4'(int'($urandom_range(14)) - 7);
        end
        for (int t = 0; t < HPT_NTRIP; t++) begin
          int k;
          k = $urandom_range(HPT_NBLK-1);
          tin[t].valid = ($urandom_range(2) == 0);
          if ($urandom_range(1) == 0)
            tin[t].col = HPT_COL_W'(k*32 + HPT_MAXD_W + int'(din[k].pos) + int'($urandom_range(30)) - 15);
          else
            tin[t].col = HPT_COL_W'($urandom_range(HPT_NCOL-1));
        end
        hd[cyc+1] = din;
        ht[cyc+1] = tin;
      end
    end
    checks++; if (n_hh == 0 || n_hl == 0 || n_ll == 0) begin failures++; $display("FAIL missing combination"); end
    $display("combinations: HH=%0d HL=%0d LL=%0d", n_hh, n_hl, n_ll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
